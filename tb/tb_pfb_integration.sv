// Workload testbench: the channelizer configured as in the ADC test system.
//
// A 500 MS/s ADC delivers four parallel 16-bit complex lanes (125 MHz each),
// so the commutator is a pass-through (IN_LANES = 4); the prototype lowpass has
// 337 taps, padded with three zeros to 340 = 4 x 85; a decimator keeps one of
// every 8 channel vectors (125 MHz / 8 = 15.625 MHz output rate).
// The prototype is this testbench's own windowed sinc (cutoff 6.75 MHz at
// fs = 500 MHz, Hamming window, Q17), computed at elaboration.
// Input: two complex tones after the local oscillator, f1' = -4.685 MHz and
// f2' = +129.685 MHz (4.685 MHz off the centres of channels 0 and 1), with
// amplitudes 12000 and 8000. Checks: every output vector bit-exact against the
// directly evaluated channelizer equation; once the filters have filled,
// channel 0 holds tone 1, channel 1 holds tone 2, channels 2 and 3 stay below
// 1 % of them; the output arrives once every 8 clocks.
module tb_pfb_integration;
  localparam int M = 4, DW = 16, CW = 16, TAPS = 340, DEC = 8;
  localparam int OW = DW + CW + $clog2(TAPS / M) + 2;
  localparam int NBLK = 1600, NS = NBLK * M;
  localparam real PI = 3.141592653589793;

  typedef logic [TAPS-1:0][CW-1:0] coefs_t;

  function automatic coefs_t make_proto();
    coefs_t c;
    real fc, t, s, w;
    fc = 6.75 / 500.0;
    for (int n = 0; n < TAPS; n++) begin
      t = real'(n) - 168.0;
      s = (n == 168) ? 2.0 * fc : $sin(2.0 * PI * fc * t) / (PI * t);
      w = 0.54 - 0.46 * $cos(2.0 * PI * real'(n) / 336.0);
      c[n] = (n < 337) ? CW'($rtoi(s * w * 131072.0)) : '0;
    end
    return c;
  endfunction

  localparam coefs_t H = make_proto();

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DW-1:0] in_i [M], in_q [M];
  logic out_valid;
  logic signed [OW-1:0] out_i [M], out_q [M];
  int checks = 0, failures = 0;

  pfb_channelizer #(
    .IN_LANES (M), .DATA_W (DW), .COEF_W (CW), .TAPS (TAPS), .COEFS (H), .DECIM (DEC)
  ) dut (.clk_in (clk), .clk, .rst_n, .in_valid, .in_i, .in_q, .out_valid, .out_i, .out_q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NBLK + 500) @(posedge clk);
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

  longint xi [NS], xq [NS];

  function automatic longint xs(input int s, input bit q);
    if (s < 0 || s >= NS) return 0;
    return q ? xq[s] : xi[s];
  endfunction

  task automatic expected(input int n, output longint ei [M], output longint eq [M]);
    for (int k = 0; k < M; k++) begin
      ei[k] = 0; eq[k] = 0;
      for (int l = 0; l < TAPS; l++) begin
        longint c, a, b;
        c = longint'($signed(H[l]));
        a = c * xs(4*n + 3 - l, 0);
        b = c * xs(4*n + 3 - l, 1);
        case ((k * l) % 4)
          0: begin ei[k] += a; eq[k] += b; end
          1: begin ei[k] -= b; eq[k] += a; end
          2: begin ei[k] -= a; eq[k] -= b; end
          3: begin ei[k] += b; eq[k] -= a; end
        endcase
      end
    end
  endtask

  function automatic real amp(input longint a, input longint b);
    return $sqrt(real'(a) * real'(a) + real'(b) * real'(b));
  endfunction

  initial begin : stim
    longint ei [M], eq [M];
    real dc_gain, ph1, ph2, a0, a1, a2, a3;
    int blk = 0, nout = 0, good = 0, last_out = -1, cyc = 0, rate_ok = 0;
    dc_gain = 0.0;
    for (int l = 0; l < TAPS; l++) dc_gain += real'($signed(H[l]));
    for (int s = 0; s < NS; s++) begin
      ph1 = 2.0 * PI * (-4.685) / 500.0 * real'(s);
      ph2 = 2.0 * PI * 129.685 / 500.0 * real'(s);
      xi[s] = longint'($rtoi(12000.0 * $cos(ph1) + 8000.0 * $cos(ph2)));
      xq[s] = longint'($rtoi(12000.0 * $sin(ph1) + 8000.0 * $sin(ph2)));
    end
    for (int l = 0; l < M; l++) begin in_i[l] = '0; in_q[l] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (blk < NBLK || cyc < NBLK + 4) begin
      @(negedge clk);
      cyc++;
      in_valid = blk < NBLK;
      for (int l = 0; l < M; l++) begin
        in_i[l] = DW'(xs(blk * M + l, 0));
        in_q[l] = DW'(xs(blk * M + l, 1));
      end
      if (in_valid) blk++;
      #2;
      if (out_valid) begin
        expected(nout * DEC, ei, eq);
        for (int k = 0; k < M; k++)
          check(longint'(out_i[k]) == ei[k] && longint'(out_q[k]) == eq[k], $sformatf("output %0d channel %0d", nout, k));
        if (last_out >= 0) begin
          check(cyc - last_out == DEC, "one output every 8 clocks");
          rate_ok++;
        end
        last_out = cyc;
        if (nout * DEC >= TAPS / M) begin
          a0 = amp(longint'(out_i[0]), longint'(out_q[0])) / dc_gain;
          a1 = amp(longint'(out_i[1]), longint'(out_q[1])) / dc_gain;
          a2 = amp(longint'(out_i[2]), longint'(out_q[2])) / dc_gain;
          a3 = amp(longint'(out_i[3]), longint'(out_q[3])) / dc_gain;
          check(a0 > 6000.0 && a0 < 13000.0 && a1 > 4000.0 && a1 < 9000.0 &&
                a2 < 0.01 * a1 && a3 < 0.01 * a1, "tones separated into channels 0 and 1");
          if (nout == 100) $display("channel amplitudes: %.1f %.1f %.1f %.1f", a0, a1, a2, a3);
          good++;
        end
        nout++;
      end
    end
    check(nout == NBLK / DEC, "output count");
    check(good > 150 && rate_ok > 150, "steady state observed");
    $display("outputs %0d", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
