// Self-checking testbench for dft_direct.
//
// Two instances: N = 8 with an output register, and N = 5 (not a power of
// two) combinational with a 1-bit output shift. Random complex vectors
// (including full-scale ones) are applied with random valid. Each output is
// checked two ways: exactly, against the definition evaluated with twiddles
// rounded to 16-bit Q2.14 (floor((sum of x_n * W^(nk))/2^(14+SHIFT))); and
// approximately, against the ideal DFT in floating point (error below a bound
// set by the twiddle rounding). The registered instance must answer exactly
// one clock after its input.
module tb_dft_direct;
  localparam int IW = 12;
  localparam int N8 = 8, N5 = 5;
  localparam int OW8 = IW + 3 + 1, OW5 = IW + 3 + 1 - 1;
  localparam real PI = 3.141592653589793;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [IW-1:0] re8 [N8], im8 [N8], re5 [N5], im5 [N5];
  logic v8, v5;
  logic signed [OW8-1:0] ore8 [N8], oim8 [N8];
  logic signed [OW5-1:0] ore5 [N5], oim5 [N5];
  int checks = 0, failures = 0;

  dft_direct #(.N(N8), .IN_W(IW))                       d8 (.clk, .rst_n, .in_valid, .in_re(re8), .in_im(im8), .out_valid(v8), .out_re(ore8), .out_im(oim8));
  dft_direct #(.N(N5), .IN_W(IW), .PIPE(0), .SHIFT(1))  d5 (.clk, .rst_n, .in_valid, .in_re(re5), .in_im(im5), .out_valid(v5), .out_re(ore5), .out_im(oim5));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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

  function automatic longint q14(input real x);
    return longint'($rtoi(x * 16384.0 + ((x >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // Exact fixed-point reference and ideal value for bin k of an n-point DFT.
  task automatic ref_bin(input int n, input int k, input longint a [8], input longint b [8], input int shift,
                         output longint er, output longint ei, output real ir, output real ii);
    longint sr = 0, si = 0;
    ir = 0.0; ii = 0.0;
    for (int i = 0; i < n; i++) begin
      real ph;
      longint c, s;
      ph = 2.0 * PI * real'((i * k) % n) / real'(n);
      c = q14($cos(ph)); s = q14($sin(ph));
      sr += a[i] * c + b[i] * s;
      si += b[i] * c - a[i] * s;
      ir += real'(a[i]) * $cos(ph) + real'(b[i]) * $sin(ph);
      ii += real'(b[i]) * $cos(ph) - real'(a[i]) * $sin(ph);
    end
    er = sr >>> (14 + shift);
    ei = si >>> (14 + shift);
  endtask

  function automatic bit close(input longint got, input real ideal, input int shift, input int n);
    real d;
    d = real'(got) - ideal / real'(1 << shift);
    if (d < 0.0) d = -d;
    return d < 1.0 + real'(n) * 4096.0 / 16384.0;
  endfunction

  initial begin : stim
    longint a8 [8], b8 [8], a5 [8], b5 [8];
    longint er, ei;
    real ir, ii;
    bit prev_v = 0;
    longint p_er [N8], p_ei [N8];
    for (int i = 0; i < 8; i++) begin a8[i] = 0; b8[i] = 0; a5[i] = 0; b5[i] = 0; end
    for (int i = 0; i < N8; i++) begin re8[i] = '0; im8[i] = '0; end
    for (int i = 0; i < N5; i++) begin re5[i] = '0; im5[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      // registered N = 8 instance: result of the previous cycle's input
      check(v8 == prev_v, "N=8 valid one clock later");
      if (prev_v)
        for (int k = 0; k < N8; k++)
          check(longint'(ore8[k]) == p_er[k] && longint'(oim8[k]) == p_ei[k], $sformatf("N=8 bin %0d", k));
      in_valid = ($urandom % 4) != 0;
      for (int i = 0; i < N8; i++) begin
        re8[i] = (t < 4) ? ((t % 2) ? -12'sd2048 : 12'sd2047) : IW'($urandom);
        im8[i] = (t < 4) ? (((t + i) % 2) ? -12'sd2048 : 12'sd2047) : IW'($urandom);
        a8[i] = longint'(re8[i]); b8[i] = longint'(im8[i]);
      end
      for (int i = 0; i < N5; i++) begin
        re5[i] = IW'($urandom); im5[i] = IW'($urandom);
        a5[i] = longint'(re5[i]); b5[i] = longint'(im5[i]);
      end
      for (int k = 0; k < N8; k++) begin
        ref_bin(N8, k, a8, b8, 0, er, ei, ir, ii);
        p_er[k] = er; p_ei[k] = ei;
        check(close(er, ir, 0, N8) && close(ei, ii, 0, N8), "N=8 reference near ideal DFT");
      end
      prev_v = in_valid;
      #1;
      check(v5 == in_valid, "N=5 valid");
      for (int k = 0; k < N5; k++) begin
        ref_bin(N5, k, a5, b5, 1, er, ei, ir, ii);
        check(longint'(ore5[k]) == er && longint'(oim5[k]) == ei, $sformatf("N=5 bin %0d", k));
        check(close(longint'(ore5[k]), ir, 1, N5) && close(longint'(oim5[k]), ii, 1, N5), "N=5 output near ideal DFT");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
