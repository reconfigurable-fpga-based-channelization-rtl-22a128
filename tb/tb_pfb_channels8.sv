// Testbench for pfb_channelizer with M = 8 channels (general DFT path).
//
// Eight channels, a 56-tap prototype (7 taps per phase; this testbench's own
// Hamming-windowed sinc with cutoff fs/16, Q1.15, computed at elaboration),
// one serial 8-bit input lane on clk_in, filter bank on clk = clk_in / 8.
// The input is a complex tone at the centre of channel 3 (+3*fs/8), amplitude
// 100, plus a weaker one (amplitude 25) at the centre of channel 6 (-2*fs/8).
// Each output vector is compared bit-exactly with the channelizer equation:
// branch sums b_rho(n) = sum_m h(8m+rho) x(8n+7-8m-rho), then channel k = DFT
// bin (8-k) mod 8 with the same Q2.14 rounded twiddles, fraction dropped.
// Once the filters have filled, channels 3 and 6 must hold the tones and
// every other channel less than 1 % of channel 6.
module tb_pfb_channels8;
  localparam int M = 8, DW = 8, CW = 16, TAPS = 56;
  localparam int OW = DW + CW + $clog2(TAPS / M) + $clog2(M) + 1;
  localparam int S_END = 4000;
  localparam real PI = 3.141592653589793;

  typedef logic [TAPS-1:0][CW-1:0] coefs_t;

  function automatic coefs_t make_proto();
    coefs_t c;
    real fc, t, s, w;
    fc = 1.0 / 16.0;
    for (int n = 0; n < TAPS; n++) begin
      t = real'(n) - 27.5;
      s = $sin(2.0 * PI * fc * t) / (PI * t);
      w = 0.54 - 0.46 * $cos(2.0 * PI * real'(n) / 55.0);
      c[n] = CW'($rtoi(s * w * 32768.0));
    end
    return c;
  endfunction

  localparam coefs_t H = make_proto();

  logic clk, clk_in, rst_n = 0, in_valid = 0;
  logic signed [DW-1:0] in_i [1], in_q [1];
  logic out_valid;
  logic signed [OW-1:0] out_i [M], out_q [M];
  int checks = 0, failures = 0;

  pfb_channelizer #(.M (M), .TAPS (TAPS), .COEFS (H))
    dut (.clk_in, .clk, .rst_n, .in_valid, .in_i, .in_q, .out_valid, .out_i, .out_q);

  // clk_in rises at 5, 15, 25, ...; clk (an eighth of the rate) at 5, 85, ...
  initial begin clk_in = 0; forever #5 clk_in = ~clk_in; end
  initial begin clk = 0; #5; forever begin clk = ~clk; #40; end end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
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

  function automatic longint xs(input int s, input bit q);
    real p3, p6, v;
    if (s < 0 || s >= S_END) return 0;
    p3 = 2.0 * PI * 3.0 * real'(s) / 8.0;
    p6 = 2.0 * PI * 6.0 * real'(s) / 8.0;
    v = q ? 100.0 * $sin(p3) + 25.0 * $sin(p6) : 100.0 * $cos(p3) + 25.0 * $cos(p6);
    return longint'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic longint q14(input real x);
    return longint'($rtoi(x * 16384.0 + ((x >= 0.0) ? 0.5 : -0.5)));
  endfunction

  task automatic expected(input int n, output longint ei [M], output longint eq [M]);
    longint bi [M], bq [M];
    for (int rho = 0; rho < M; rho++) begin
      bi[rho] = 0; bq[rho] = 0;
      for (int m = 0; m < TAPS / M; m++) begin
        longint c;
        c = longint'($signed(H[m*M + rho]));
        bi[rho] += c * xs(M*n + M-1 - M*m - rho, 0);
        bq[rho] += c * xs(M*n + M-1 - M*m - rho, 1);
      end
    end
    for (int k = 0; k < M; k++) begin
      longint sr, si;
      int bin;
      bin = (M - k) % M;
      sr = 0; si = 0;
      for (int rho = 0; rho < M; rho++) begin
        real ph;
        longint c, s;
        ph = 2.0 * PI * real'((rho * bin) % M) / real'(M);
        c = q14($cos(ph)); s = q14($sin(ph));
        sr += bi[rho] * c + bq[rho] * s;
        si += bq[rho] * c - bi[rho] * s;
      end
      ei[k] = sr >>> 14;
      eq[k] = si >>> 14;
    end
  endtask

  int s = 0;

  initial begin : feed
    in_i[0] = '0; in_q[0] = '0;
    wait (rst_n);
    while (1) begin
      @(negedge clk_in);
      in_valid = (s < S_END);
      in_i[0] = DW'(xs(s, 0));
      in_q[0] = DW'(xs(s, 1));
      if (in_valid) s++;
    end
  end

  initial begin : stim
    longint ei [M], eq [M];
    real amp [M];
    int n = 0, steady = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n < S_END / M) begin
      @(negedge clk);
      if (out_valid) begin
        bit quiet;
        expected(n, ei, eq);
        for (int k = 0; k < M; k++)
          check(longint'(out_i[k]) == ei[k] && longint'(out_q[k]) == eq[k], $sformatf("block %0d channel %0d", n, k));
        if (n >= TAPS / M) begin
          for (int k = 0; k < M; k++)
            amp[k] = $sqrt(real'(out_i[k]) * real'(out_i[k]) + real'(out_q[k]) * real'(out_q[k]));
          quiet = 1;
          for (int k = 0; k < M; k++)
            if (k != 3 && k != 6 && amp[k] >= 0.01 * amp[6]) quiet = 0;
          check(amp[3] > 3.0 * amp[6] && quiet, "tones only in channels 3 and 6");
          if (n == 100) $display("channel amplitudes: %.0f %.0f %.0f %.0f %.0f %.0f %.0f %.0f",
                                 amp[0], amp[1], amp[2], amp[3], amp[4], amp[5], amp[6], amp[7]);
          steady++;
        end
        n++;
      end
    end
    check(steady > 400, "steady-state blocks observed");
    $display("blocks %0d", n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
