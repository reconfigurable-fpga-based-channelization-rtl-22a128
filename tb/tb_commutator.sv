// Self-checking testbench for commutator.
//
// Four instances with M = 4 branches: a serial input (IN_LANES = 1), a
// two-lane input that needs remuxing (IN_LANES = 2) and a four-lane input
// (pass-through), all on one clock, plus a serial input whose input clock runs
// four times faster than its branch clock. Each receives the sample sequence s = 0, 1, 2, ... (lane 0
// the oldest of a beat) with random valid gaps, I and Q carrying different
// values derived from s. The expected branch vector of block n is
// branch rho = sample 4n+3-rho (x_rho(n) = x(nM - rho)). On one clock the
// serial and remuxing instances must present a block exactly two clocks after
// its last beat, the pass-through instance in the same cycle. The two-clock
// instance must deliver every block, in order, once per branch clock at most.
module tb_commutator;
  localparam int M = 4, DW = 8;

  logic clk = 0, clk4, clkq, rst_n = 0;
  logic iv1 = 0, iv2 = 0, iv4 = 0;
  logic signed [DW-1:0] i1 [1], q1 [1], i2 [2], q2 [2], i4 [4], q4 [4];
  logic ov1, ov2, ov4;
  logic signed [DW-1:0] oi1 [M], oq1 [M], oi2 [M], oq2 [M], oi4 [M], oq4 [M];
  int checks = 0, failures = 0;

  commutator #(.M(M), .IN_LANES(1)) c1 (.clk_in(clk), .clk, .rst_n, .in_valid(iv1), .in_i(i1), .in_q(q1), .out_valid(ov1), .out_i(oi1), .out_q(oq1));
  commutator #(.M(M), .IN_LANES(2)) c2 (.clk_in(clk), .clk, .rst_n, .in_valid(iv2), .in_i(i2), .in_q(q2), .out_valid(ov2), .out_i(oi2), .out_q(oq2));
  commutator #(.M(M), .IN_LANES(4)) c4 (.clk_in(clk), .clk, .rst_n, .in_valid(iv4), .in_i(i4), .in_q(q4), .out_valid(ov4), .out_i(oi4), .out_q(oq4));

  always #5 clk = ~clk;

  // Two-clock instance: clk4 rises at 1, 3, 5, ...; clkq at 1, 9, 17, ...
  logic ivf = 0;
  logic signed [DW-1:0] fi [1], fq [1];
  logic ovf;
  logic signed [DW-1:0] ofi [M], ofq [M];
  commutator #(.M(M), .IN_LANES(1)) cf (.clk_in(clk4), .clk(clkq), .rst_n, .in_valid(ivf), .in_i(fi), .in_q(fq), .out_valid(ovf), .out_i(ofi), .out_q(ofq));
  initial begin clk4 = 0; forever #1 clk4 = ~clk4; end
  initial begin clkq = 0; #1; forever begin clkq = ~clkq; #4; end end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [DW-1:0] sval_i(int s); return DW'(s * 37 + 11); endfunction
  function automatic logic signed [DW-1:0] sval_q(int s); return DW'(s * 91 - 5);  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic check_block(input string who, input int blk,
                             input logic signed [DW-1:0] oi [M], input logic signed [DW-1:0] oq [M]);
    for (int rho = 0; rho < M; rho++)
      check(oi[rho] == sval_i(blk*M + M-1-rho) && oq[rho] == sval_q(blk*M + M-1-rho), who);
  endtask

  int s1 = 0, s2 = 0, s4 = 0;          // next sample index per instance
  int blk1 = 0, blk2 = 0;              // next expected block
  bit due1 = 0, due2 = 0;              // a block completed on the last edge
  int blocks4 = 0;
  int sf = 0, blkf = 0;                // two-clock instance
  bit due1_d = 0, due2_d = 0;

  initial begin : stim_fast
    fi[0] = '0; fq[0] = '0;
    wait (rst_n);
    while (sf < 1200) begin
      @(negedge clk4);
      ivf = ($urandom % 6) != 0;
      fi[0] = ivf ? sval_i(sf) : DW'($urandom);
      fq[0] = ivf ? sval_q(sf) : DW'($urandom);
      if (ivf) sf++;
    end
    @(negedge clk4); ivf = 0;
  end

  always @(negedge clkq) if (rst_n) begin
    if (ovf) begin
      check_block("two-clock block", blkf, ofi, ofq);
      blkf++;
    end
  end

  initial begin : stim
    i1[0] = '0; q1[0] = '0;
    for (int l = 0; l < 2; l++) begin i2[l] = '0; q2[l] = '0; end
    for (int l = 0; l < 4; l++) begin i4[l] = '0; q4[l] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      // registered instances: a block is due exactly one clock after its last beat
      check(ov1 == due1_d, "serial out_valid timing");
      if (due1_d) begin check_block("serial block", blk1, oi1, oq1); blk1++; end
      check(ov2 == due2_d, "remux out_valid timing");
      if (due2_d) begin check_block("remux block", blk2, oi2, oq2); blk2++; end
      due1_d = due1; due2_d = due2;
      due1 = 0; due2 = 0;

      iv1 = ($urandom % 3) != 0;
      if (iv1) begin
        i1[0] = sval_i(s1); q1[0] = sval_q(s1);
        due1 = (s1 % M) == M-1; s1++;
      end else begin
        i1[0] = DW'($urandom); q1[0] = DW'($urandom);
      end
      iv2 = ($urandom % 3) != 0;
      for (int l = 0; l < 2; l++) begin
        i2[l] = iv2 ? sval_i(s2 + l) : DW'($urandom);
        q2[l] = iv2 ? sval_q(s2 + l) : DW'($urandom);
      end
      if (iv2) begin due2 = ((s2 + 1) % M) == M-1; s2 += 2; end
      iv4 = ($urandom % 3) != 0;
      for (int l = 0; l < 4; l++) begin
        i4[l] = sval_i(s4 + l); q4[l] = sval_q(s4 + l);
      end
      #1;
      check(ov4 == iv4, "pass-through valid");
      if (iv4) begin check_block("pass-through block", s4 / M, oi4, oq4); s4 += 4; blocks4++; end
    end
    check(blk1 > 50 && blk2 > 50 && blocks4 > 50, "enough blocks seen");
    check(sf == 1200 && blkf == 300, "two-clock instance delivered every block");
    $display("blocks: serial %0d remux %0d pass-through %0d two-clock %0d", blk1, blk2, blocks4, blkf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
