// Self-checking testbench for dft4.
//
// Three instances (PIPE = 0, 1, 2; the last also drops 1 LSB) get the same
// random complex vectors, including full-scale extremes. The reference is the
// DFT sum X(k) = sum_n x_n * (-j)^(n*k) evaluated directly, independent of the
// butterfly structure. Each instance's output is checked PIPE clocks after its
// input, and out_valid must follow in_valid with exactly that delay.
module tb_dft4;
  localparam int IW = 12;
  localparam int OW = IW + 2;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [IW-1:0] in_re [4], in_im [4];
  logic v0, v1, v2;
  logic signed [OW-1:0]   re0 [4], im0 [4], re1 [4], im1 [4];
  logic signed [OW-2:0]   re2 [4], im2 [4];
  int checks = 0, failures = 0;

  dft4 #(.IN_W(IW), .PIPE(0))            d0 (.clk, .rst_n, .in_valid, .in_re, .in_im, .out_valid(v0), .out_re(re0), .out_im(im0));
  dft4 #(.IN_W(IW), .PIPE(1))            d1 (.clk, .rst_n, .in_valid, .in_re, .in_im, .out_valid(v1), .out_re(re1), .out_im(im1));
  dft4 #(.IN_W(IW), .PIPE(2), .SHIFT(1)) d2 (.clk, .rst_n, .in_valid, .in_re, .in_im, .out_valid(v2), .out_re(re2), .out_im(im2));

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

  // Expected bins per cycle, kept for the pipelined instances.
  int exp_re [3][4], exp_im [3][4];
  bit exp_v [3];

  task automatic reference(output int xr [4], output int xi [4]);
    for (int k = 0; k < 4; k++) begin
      xr[k] = 0; xi[k] = 0;
      for (int n = 0; n < 4; n++) begin
        int a = int'(in_re[n]), b = int'(in_im[n]);
        case ((n * k) % 4)
          0: begin xr[k] += a;  xi[k] += b;  end
          1: begin xr[k] += b;  xi[k] -= a;  end   // * -j
          2: begin xr[k] -= a;  xi[k] -= b;  end   // * -1
          3: begin xr[k] -= b;  xi[k] += a;  end   // * +j
        endcase
      end
    end
  endtask

  initial begin : stim
    int xr [4], xi [4];
    for (int n = 0; n < 4; n++) begin in_re[n] = '0; in_im[n] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      // outputs of the registered instances for earlier inputs
      check(v1 == exp_v[0], "PIPE=1 valid delay");
      check(v2 == exp_v[1], "PIPE=2 valid delay");
      for (int k = 0; k < 4; k++) begin
        if (exp_v[0]) check(int'(re1[k]) == exp_re[0][k] && int'(im1[k]) == exp_im[0][k], "PIPE=1 bin");
        if (exp_v[1]) check(int'(re2[k]) == (exp_re[1][k] >>> 1) && int'(im2[k]) == (exp_im[1][k] >>> 1), "PIPE=2 bin");
      end
      exp_v[1] = exp_v[0]; exp_re[1] = exp_re[0]; exp_im[1] = exp_im[0];
      in_valid = ($urandom % 4) != 0;
      for (int n = 0; n < 4; n++) begin
        if (t < 8) begin
          in_re[n] = (t % 2) ? -12'sd2048 : 12'sd2047;
          in_im[n] = ((t + n) % 2) ? -12'sd2048 : 12'sd2047;
        end else begin
          in_re[n] = IW'($urandom);
          in_im[n] = IW'($urandom);
        end
      end
      reference(xr, xi);
      #1;
      check(v0 == in_valid, "PIPE=0 valid");
      for (int k = 0; k < 4; k++)
        check(int'(re0[k]) == xr[k] && int'(im0[k]) == xi[k], "PIPE=0 bin");
      exp_v[0] = in_valid; exp_re[0] = xr; exp_im[0] = xi;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
