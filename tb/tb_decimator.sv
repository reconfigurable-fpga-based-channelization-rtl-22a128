// Self-checking testbench for decimator (default: 4 channels, factor 8).
//
// Numbered vectors arrive with random valid gaps. The decimator must emit
// exactly vectors 0, 8, 16, ..., each one clock after it was accepted, and
// nothing else.
module tb_decimator;
  localparam int CH = 4, W = 16, F = 8;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] in_i [CH], in_q [CH], out_i [CH], out_q [CH];
  logic out_valid;
  int checks = 0, failures = 0;

  decimator dut (.clk, .rst_n, .in_valid, .in_i, .in_q, .out_valid, .out_i, .out_q);

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

  initial begin : stim
    int n = 0, kept = 0, due = -1;
    for (int c = 0; c < CH; c++) begin in_i[c] = '0; in_q[c] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      check(out_valid == (due >= 0), "out_valid one clock after a kept vector");
      if (due >= 0) begin
        for (int c = 0; c < CH; c++)
          check(out_i[c] == W'(due * 16 + c) && out_q[c] == W'(-due * 16 - c), "kept vector contents");
        kept++;
      end
      due = -1;
      in_valid = ($urandom % 3) != 0;
      for (int c = 0; c < CH; c++) begin
        in_i[c] = in_valid ? W'(n * 16 + c)  : W'($urandom);
        in_q[c] = in_valid ? W'(-n * 16 - c) : W'($urandom);
      end
      if (in_valid) begin
        if (n % F == 0) due = n;
        n++;
      end
    end
    check(kept == (n + F - 1) / F - ((due >= 0) ? 1 : 0), "one of every 8 vectors kept");
    $display("vectors in %0d, kept %0d", n, kept);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
