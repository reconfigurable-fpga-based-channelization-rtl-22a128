// Self-checking testbench for polyphase_fir (default size: 4 branches,
// 28-tap prototype, 7 taps per phase).
//
// Random complex branch vectors with random valid gaps are fed in. The
// reference for branch rho is y_rho(n) = sum_m h(mM+rho) * x_rho(n-m), computed
// from the prototype directly, separately for I and Q. An impulse on one
// branch checks the 6-step chain latency of the phase filters.
module tb_polyphase_fir;
  localparam int M = 4, DW = 8, CW = 16, TAPS = 28, PT = TAPS / M;
  localparam int OW = DW + CW + $clog2(PT);
  localparam pfb_pkg::proto28_t H = pfb_pkg::PROTO28;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DW-1:0] in_i [M], in_q [M];
  logic out_valid;
  logic signed [OW-1:0] out_i [M], out_q [M];
  int checks = 0, failures = 0;

  polyphase_fir dut (.clk, .rst_n, .in_valid, .in_i, .in_q, .out_valid, .out_i, .out_q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  longint hi [M][$], hq [M][$];

  function automatic longint ref_branch(input int rho, input bit q);
    longint s = 0;
    int n = hi[rho].size();
    for (int m = 0; m < PT; m++)
      if (n > m) s += longint'($signed(H[m*M + rho])) * (q ? hq[rho][n-1-m] : hi[rho][n-1-m]);
    return s;
  endfunction

  task automatic drive(input bit v, input int imp_branch);
    @(negedge clk);
    in_valid = v;
    for (int r = 0; r < M; r++) begin
      if (imp_branch >= 0) begin
        in_i[r] = '0; in_q[r] = '0;
      end else begin
        in_i[r] = DW'($urandom); in_q[r] = DW'($urandom);
      end
      if (v) begin hi[r].push_back(longint'(in_i[r])); hq[r].push_back(longint'(in_q[r])); end
    end
    #1;
    check(out_valid == v, "valid");
    if (v)
      for (int r = 0; r < M; r++)
        check(longint'(out_i[r]) == ref_branch(r, 0) && longint'(out_q[r]) == ref_branch(r, 1), "branch output");
  endtask

  initial begin : stim
    int lat = -1;
    for (int r = 0; r < M; r++) begin in_i[r] = '0; in_q[r] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) drive(($urandom % 4) != 0, -1);
    for (int t = 0; t < PT; t++) drive(1'b1, 2);   // flush with zeros
    // impulse on branch 2 (I only): head of chain is h((PT-1)*M + 2)
    for (int t = 0; t < PT + 2; t++) begin
      @(negedge clk);
      in_valid = 1;
      for (int r = 0; r < M; r++) begin in_i[r] = '0; in_q[r] = '0; end
      if (t == 0) in_i[2] = 8'sd1;
      #1;
      check(longint'(out_i[2]) == ((t < PT) ? longint'($signed(H[t*M + 2])) : 0), "impulse response");
      check(out_i[0] == 0 && out_q[2] == 0, "no crosstalk");
      if (t > 0 && longint'(out_i[2]) == longint'($signed(H[(PT-1)*M + 2]))) lat = t;
    end
    check(lat == PT - 1, "phase filter latency 6");
    $display("phase filter latency: %0d branch samples", lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
