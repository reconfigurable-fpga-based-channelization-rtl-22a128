// Self-checking testbench for fir_transpose.
//
// Two filters see the same random stream with random valid gaps: the default
// 7-tap filter (combinational output) and a 5-tap filter with the output
// register and a 2-bit output shift. Each output is compared with a direct
// convolution y(t) = sum_k p(k) x(t-k) over the accepted samples. An impulse
// then checks the latency: the product of the head of the adder chain
// (coefficient p(TAPS-1)) must reach the output exactly TAPS-1 = 6 samples
// after the impulse.
module tb_fir_transpose;
  localparam int DW = 8, CW = 16, T0 = 7, T1 = 5;
  localparam logic [T0-1:0][CW-1:0] C0 = {16'sd172, -16'sd840, 16'sd3563,
                                          16'sd6247, -16'sd1177, 16'sd269, -16'sd57};
  localparam logic [T1-1:0][CW-1:0] C1 = {-16'sd300, 16'sd1000, 16'sd32767, -16'sd32768, 16'sd5};
  localparam int W0 = DW + CW + $clog2(T0);
  localparam int W1 = DW + CW + $clog2(T1) - 2;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DW-1:0] x = '0;
  logic v0, v1;
  logic signed [W0-1:0] y0;
  logic signed [W1-1:0] y1;
  int checks = 0, failures = 0;

  fir_transpose dut0 (.clk, .rst_n, .in_valid, .x, .out_valid(v0), .y(y0));
  fir_transpose #(.TAPS(T1), .COEFS(C1), .OUT_REG(1'b1), .SHIFT(2))
    dut1 (.clk, .rst_n, .in_valid, .x, .out_valid(v1), .y(y1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hist [$];   // accepted samples, newest at the back

  function automatic longint conv(input logic [T0-1:0][CW-1:0] c0,
                                  input logic [T1-1:0][CW-1:0] c1, input int taps, input bit sel);
    longint s = 0;
    for (int k = 0; k < taps; k++) begin
      longint cf = sel ? longint'($signed(c1[k])) : longint'($signed(c0[k]));
      if (hist.size() > k) s += cf * hist[hist.size()-1-k];
    end
    return s;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Drive one step; for dut0 check at once, for dut1 one clock later.
  task automatic step(input bit v, input logic signed [DW-1:0] d);
    longint exp0, exp1;
    @(negedge clk);
    in_valid = v; x = d;
    if (v) hist.push_back(longint'(d));
    #1;
    exp0 = conv(C0, C1, T0, 0);
    if (v) check(v0 && (longint'(y0) == exp0), "dut0 output");
    else   check(!v0, "dut0 valid low");
    exp1 = conv(C0, C1, T1, 1) >>> 2;
    @(posedge clk); #1;
    if (v) check(v1 && (longint'(y1) == exp1), "dut1 registered output");
    else   check(!v1, "dut1 valid low");
  endtask

  initial begin : stim
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++)
      step(($urandom % 10) < 7, DW'($urandom));
    // extremes
    for (int i = 0; i < 20; i++) step(1'b1, (i % 2) ? 8'sh80 : 8'sh7f);
    // impulse: flush, then 1 followed by zeros
    for (int i = 0; i < T0; i++) step(1'b1, '0);
    lat = -1;
    for (int s = 0; s < T0 + 3; s++) begin
      @(negedge clk);
      in_valid = 1; x = (s == 0) ? 8'sd1 : 8'sd0;
      hist.push_back(longint'(x));
      #1;
      check(longint'(y0) == ((s < T0) ? longint'($signed(C0[s])) : 0), "impulse response");
      if (s > 0 && longint'(y0) == longint'($signed(C0[T0-1]))) lat = s;
    end
    check(lat == T0 - 1, "latency of chain head = TAPS-1 samples");
    $display("chain latency measured: %0d samples", lat);
    @(negedge clk); in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
