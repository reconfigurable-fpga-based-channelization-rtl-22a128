// Full-size testbench: pfb_channelizer at its default parameters (4 channels,
// 8-bit serial input through the commutator, 28-tap prototype, DFT with one
// pipeline stage), clocked as a 200 MHz input stream (clk_in) feeding a
// 50 MHz filter bank (clk): clk_in runs four times faster than clk.
//
// The input is the sum of two complex tones at the centres of channel 1
// (+fs/4, amplitude 60) and channel 3 (-fs/4, amplitude 20):
// x(s) = 60*j^s + 20*(-j)^s, exact in integers. Every output vector is compared
// with the channelizer equation evaluated directly,
// y(n,k) = sum_l h(l) * x(4n+3-l) * j^(k*l), and, once the filters have
// filled, channel 1 must carry the large tone, channel 3 the small one and
// channels 0 and 2 almost nothing. Samples arrive on clk_in with random valid
// gaps; the outputs are observed on clk.
module tb_pfb_full;
  localparam int M = 4, DW = 8, TAPS = 28, OW = 8 + 16 + 3 + 2;
  localparam pfb_pkg::proto28_t H = pfb_pkg::PROTO28;
  localparam int S_END = 4000;

  logic clk, clk_in, rst_n = 0, in_valid = 0;
  logic signed [DW-1:0] in_i [1], in_q [1];
  logic out_valid;
  logic signed [OW-1:0] out_i [M], out_q [M];
  int checks = 0, failures = 0;

  pfb_channelizer dut (.clk_in, .clk, .rst_n, .in_valid, .in_i, .in_q, .out_valid, .out_i, .out_q);

  // clk_in rises at 5, 15, 25, ...; clk at 5, 45, 85, ...
  initial begin clk_in = 0; forever #5 clk_in = ~clk_in; end
  initial begin clk = 0; #5; forever begin clk = ~clk; #20; end end

  int s = 0;

  initial begin : feed
    in_i[0] = '0; in_q[0] = '0;
    wait (rst_n);
    while (1) begin
      @(negedge clk_in);
      in_valid = (s < S_END) && (($urandom % 5) != 0);
      in_i[0] = in_valid ? DW'(xs(s, 0)) : DW'($urandom);
      in_q[0] = in_valid ? DW'(xs(s, 1)) : DW'($urandom);
      if (in_valid) s++;
    end
  end

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
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // j^s and (-j)^s as (re, im) for the two tones.
  function automatic longint xs(input int s, input bit q);
    longint re, im;
    if (s < 0) return 0;
    case (s % 4)
      0: begin re =  60 + 20; im =   0;      end
      1: begin re =   0;      im =  60 - 20; end
      2: begin re = -60 - 20; im =   0;      end
      default: begin re = 0;  im = -60 + 20; end
    endcase
    return q ? im : re;
  endfunction

  task automatic expected(input int n, output longint ei [M], output longint eq [M]);
    for (int k = 0; k < M; k++) begin
      ei[k] = 0; eq[k] = 0;
      for (int l = 0; l < TAPS; l++) begin
        longint c = longint'($signed(H[l]));
        longint a = c * xs(4*n + 3 - l, 0), b = c * xs(4*n + 3 - l, 1);
        case ((k * l) % 4)
          0: begin ei[k] += a; eq[k] += b; end
          1: begin ei[k] -= b; eq[k] += a; end
          2: begin ei[k] -= a; eq[k] -= b; end
          3: begin ei[k] += b; eq[k] -= a; end
        endcase
      end
    end
  endtask

  function automatic longint mag2(input longint a, input longint b);
    return (a / 1024) * (a / 1024) + (b / 1024) * (b / 1024);
  endfunction

  initial begin : stim
    longint ei [M], eq [M];
    int n = 0, steady = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n < S_END / 4) begin
      @(negedge clk);
      if (out_valid) begin
        expected(n, ei, eq);
        for (int k = 0; k < M; k++)
          check(longint'(out_i[k]) == ei[k] && longint'(out_q[k]) == eq[k], $sformatf("block %0d channel %0d", n, k));
        if (n >= TAPS / M) begin
          longint p0, p1, p2, p3;
          p0 = mag2(longint'(out_i[0]), longint'(out_q[0]));
          p1 = mag2(longint'(out_i[1]), longint'(out_q[1]));
          p2 = mag2(longint'(out_i[2]), longint'(out_q[2]));
          p3 = mag2(longint'(out_i[3]), longint'(out_q[3]));
          check(p1 > 8 * p3 && p3 > 100 * (p0 + p2 + 1), "tones in channels 1 and 3 only");
          if (n == 100) $display("channel powers (scaled) at block 100: %0d %0d %0d %0d", p0, p1, p2, p3);
          steady++;
        end
        n++;
      end
    end
    check(steady > 900, "steady-state blocks observed");
    $display("blocks %0d, steady %0d, ch1 = (%0d, %0d)", n, steady, out_i[1], out_q[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
