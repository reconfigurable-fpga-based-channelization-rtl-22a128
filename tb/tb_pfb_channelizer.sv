// End-to-end testbench for pfb_channelizer.
//
// Six configurations of the channelizer run side by side on the same sample
// sequence x(s), s = 0, 1, 2, ... (pseudo-random complex samples, a burst of
// full-scale values, then zeros and a single unit impulse):
//   v0  defaults: serial input through the commutator, DFT 1 pipeline stage
//   v1  4 parallel lanes (commutator is a pass-through), input every clock
//   v2  2 lanes (remuxing), FIR output register, DFT 2 pipeline stages
//   v3  4 lanes, DFT without pipeline, FIR and DFT outputs truncated
//   v4  serial input with the output decimator, factor 8
//   v5  serial input on its own clock clk_in, four times the filter-bank
//       clock (the two-clock arrangement), input valid on most fast cycles
// Every output vector is compared with the channelizer equation evaluated
// directly: branch sums b_rho(n) = sum_m h(4m+rho) x(4n+3-4m-rho) (with the
// FIR truncation), then channel k = sum_rho b_rho(n) * j^(rho*k) (with the DFT
// truncation). The total number of outputs is checked after a flush. The
// impulse measures the latency of v1 and v5: its last contribution (through
// the head of the FIR chain) must leave the DFT 7 filter-bank clocks after the
// impulse's branch vector entered the filter bank (6 FIR + 1 DFT). Each
// mechanism (serial demux, remux, pass-through, two clocks, valid gaps, FIR
// output register, truncation, DFT pipeline depths 0/1/2, decimation) is
// counted and must occur. Throughput: with an uninterrupted input (v1 all
// along, v5 after the random part) a channel vector must leave on every clk
// cycle.
module tb_pfb_channelizer;
  localparam int V = 6, M = 4, DW = 8, TAPS = 28;
  localparam pfb_pkg::proto28_t H = pfb_pkg::PROTO28;
  localparam int LANES [V] = '{1, 4, 2, 4, 1, 1};
  localparam int PIPE  [V] = '{1, 1, 2, 0, 1, 1};
  localparam bit OREG  [V] = '{0, 0, 1, 0, 0, 0};
  localparam int FSH   [V] = '{0, 0, 0, 3, 0, 0};
  localparam int DSH   [V] = '{0, 0, 0, 1, 0, 0};
  localparam int DEC   [V] = '{1, 1, 1, 1, 8, 1};
  localparam int S_RAND = 1600, S_IMP = 1664, S_END = 1800;

  logic clk, clk4, rst_n = 0;
  int checks = 0, failures = 0;
  int cyc = 0;

  // Stimulus and observed outputs, per configuration, widened to longint.
  logic                 in_valid [V];
  logic signed [DW-1:0] lane_i   [V][4];
  logic signed [DW-1:0] lane_q   [V][4];
  logic                 got_v    [V];
  longint               got_i    [V][M];
  longint               got_q    [V][M];

  for (genvar v = 0; v < V; v++) begin : g_dut
    localparam int L  = LANES[v];
    localparam int OW = DW + 16 + $clog2(TAPS / M) - FSH[v] + 2 - DSH[v];
    logic signed [DW-1:0] li [L], lq [L];
    logic signed [OW-1:0] oi [M], oq [M];
    logic                 ov;
    for (genvar l = 0; l < L; l++) begin : g_l
      assign li[l] = lane_i[v][l];
      assign lq[l] = lane_q[v][l];
    end
    pfb_channelizer #(
      .IN_LANES (L), .FIR_OUT_REG (OREG[v]), .FIR_SHIFT (FSH[v]),
      .DFT_PIPE (PIPE[v]), .DFT_SHIFT (DSH[v]), .DECIM (DEC[v])
    ) dut (
      .clk_in ((v == 5) ? clk4 : clk), .clk, .rst_n, .in_valid (in_valid[v]), .in_i (li), .in_q (lq),
      .out_valid (ov), .out_i (oi), .out_q (oq)
    );
    always_comb begin
      got_v[v] = ov;
      for (int k = 0; k < M; k++) begin
        got_i[v][k] = longint'(oi[k]);
        got_q[v][k] = longint'(oq[k]);
      end
    end
  end

  // clk4 rises at 5, 15, 25, ...; clk (a quarter of the rate) at 5, 45, ...
  initial begin clk4 = 0; forever #5 clk4 = ~clk4; end
  initial begin clk = 0; #5; forever begin clk = ~clk; #20; end end
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // The input sample sequence.
  function automatic longint xs(input int s, input bit q);
    int h;
    if (s < 0 || s >= S_END) return 0;
    if (s >= 800 && s < 816) return (((s + q) % 2) != 0) ? -128 : 127;
    if (s < S_RAND) begin
      h = (s * 1103515245 + (q ? 777 : 12345)) ^ (s << 7);
      return longint'($signed(DW'(h >> 9)));
    end
    return (s == S_IMP && !q) ? 1 : 0;
  endfunction

  // Expected channel k of output block n for configuration v.
  task automatic expected(input int v, input int n, output longint ei [M], output longint eq [M]);
    longint bi [M], bq [M];
    for (int rho = 0; rho < M; rho++) begin
      bi[rho] = 0; bq[rho] = 0;
      for (int m = 0; m < TAPS / M; m++) begin
        longint c = longint'($signed(H[m*M + rho]));
        bi[rho] += c * xs(4*n + 3 - 4*m - rho, 0);
        bq[rho] += c * xs(4*n + 3 - 4*m - rho, 1);
      end
      bi[rho] = bi[rho] >>> FSH[v];
      bq[rho] = bq[rho] >>> FSH[v];
    end
    for (int k = 0; k < M; k++) begin
      ei[k] = 0; eq[k] = 0;
      for (int rho = 0; rho < M; rho++)
        case ((rho * k) % 4)
          0: begin ei[k] += bi[rho]; eq[k] += bq[rho]; end
          1: begin ei[k] -= bq[rho]; eq[k] += bi[rho]; end   // * j
          2: begin ei[k] -= bi[rho]; eq[k] -= bq[rho]; end   // * -1
          3: begin ei[k] += bq[rho]; eq[k] -= bi[rho]; end   // * -j
        endcase
      ei[k] = ei[k] >>> DSH[v];
      eq[k] = eq[k] >>> DSH[v];
    end
  endtask

  int s_next [V];      // next sample index to send
  int n_out  [V];      // outputs received
  int gaps   [V];      // cycles with in_valid low while samples remained
  int imp_in_cyc = -1, imp_out_cyc = -1;
  int tail_nonzero = 0;
  int imp5_in_cyc = -1, imp5_out_cyc = -1;
  int last_out [V];
  int back_to_back [V];

  // v5 is fed on the fast clock.
  initial begin : stim5
    wait (rst_n);
    while (1) begin
      bit go;
      @(negedge clk4);
      // gaps only in the random part, so that around the impulse a branch
      // vector enters the filter bank on every clk edge
      go = (s_next[5] < S_END) && ((s_next[5] >= S_RAND) || ($urandom % 8) != 0);
      if (s_next[5] < S_END && !go) gaps[5]++;
      in_valid[5] = go;
      lane_i[5][0] = go ? DW'(xs(s_next[5], 0)) : DW'($urandom);
      lane_q[5][0] = go ? DW'(xs(s_next[5], 1)) : DW'($urandom);
      if (go) s_next[5]++;
    end
  end

  // Branch vector holding the impulse entering v5's filter bank (branch 3).
  always @(posedge clk)
    if (g_dut[5].dut.br_valid && s_next[5] > S_IMP && imp5_in_cyc < 0 && g_dut[5].dut.br_i[3] == 1)
      imp5_in_cyc = cyc;

  initial begin : stim
    longint ei [M], eq [M];
    int blk;
    for (int v = 0; v < V; v++) begin
      in_valid[v] = 0; s_next[v] = 0; n_out[v] = 0; gaps[v] = 0;
      last_out[v] = -1; back_to_back[v] = 0;
      for (int l = 0; l < 4; l++) begin lane_i[v][l] = '0; lane_q[v][l] = '0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (cyc < 3200) begin
      @(negedge clk);
      for (int v = 0; v < V - 1; v++) begin
        bit go;
        go = (s_next[v] < S_END) && ((v == 1) || ($urandom % 4) != 0);
        if (s_next[v] < S_END && !go) gaps[v]++;
        in_valid[v] = go;
        for (int l = 0; l < 4; l++) begin
          lane_i[v][l] = go ? DW'(xs(s_next[v] + l, 0)) : DW'($urandom);
          lane_q[v][l] = go ? DW'(xs(s_next[v] + l, 1)) : DW'($urandom);
        end
        if (go && v == 1 && s_next[v] == S_IMP) imp_in_cyc = cyc;
        if (go) s_next[v] += LANES[v];
      end
      #2;
      for (int v = 0; v < V; v++) begin
        if (got_v[v]) begin
          blk = n_out[v] * DEC[v];
          expected(v, blk, ei, eq);
          for (int k = 0; k < M; k++)
            check(got_i[v][k] == ei[k] && got_q[v][k] == eq[k], $sformatf("v%0d block %0d channel %0d", v, blk, k));
          if (v == 5 && blk == S_IMP / 4 + TAPS / M - 1) imp5_out_cyc = cyc;
          if (v == 1 && blk == S_IMP / 4 + TAPS / M - 1) begin
            imp_out_cyc = cyc;
            for (int k = 0; k < M; k++) if (got_i[v][k] != 0 || got_q[v][k] != 0) tail_nonzero++;
          end
          if ((v == 1 || (v == 5 && blk > S_RAND / 4 + 2)) && last_out[v] >= 0) begin
            check(cyc - last_out[v] == 1, $sformatf("v%0d one output per clk", v));
            back_to_back[v]++;
          end
          last_out[v] = cyc;
          n_out[v]++;
        end
      end
    end
    for (int v = 0; v < V; v++) begin
      int blocks;
      blocks = S_END / 4;
      check(s_next[v] == S_END, $sformatf("v%0d sent all samples", v));
      check(n_out[v] == (blocks + DEC[v] - 1) / DEC[v], $sformatf("v%0d output count %0d", v, n_out[v]));
    end
    check(tail_nonzero == M, "impulse tail reaches every channel");
    check(imp_out_cyc - imp_in_cyc == 7, $sformatf("latency %0d clocks, expected 7", imp_out_cyc - imp_in_cyc));
    $display("latency (4 lanes, FIR + DFT): %0d clocks", imp_out_cyc - imp_in_cyc);
    check(imp5_out_cyc - imp5_in_cyc == 7, $sformatf("two-clock latency %0d clocks, expected 7", imp5_out_cyc - imp5_in_cyc));
    $display("latency (serial on 4x clock, FIR + DFT): %0d filter-bank clocks", imp5_out_cyc - imp5_in_cyc);
    // mechanisms
    check(n_out[0] > 0, "serial commutator used");
    check(n_out[2] > 0, "remuxing commutator used");
    check(n_out[1] > 0 && n_out[3] > 0, "pass-through commutator used");
    check(gaps[0] > 0 && gaps[2] > 0, "input valid gaps occurred");
    check(n_out[2] > 0, "FIR output register and 2-stage DFT used");
    check(n_out[3] > 0, "truncation and 0-stage DFT used");
    check(n_out[4] > 0 && n_out[4] < n_out[0], "decimation occurred");
    check(n_out[5] > 0 && gaps[5] > 0, "two-clock commutator used, with gaps");
    check(back_to_back[1] > 400 && back_to_back[5] > 40, "full-rate stretches observed");
    $display("outputs: serial %0d, 4-lane %0d, remux %0d, truncated %0d, decimated %0d, two-clock %0d; gaps serial %0d",
             n_out[0], n_out[1], n_out[2], n_out[3], n_out[4], n_out[5], gaps[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
