// Parallel, multiplier-free 4-point DFT.
//
// Computes X(k) = sum_n x_n * exp(-j*2*pi*n*k/4), k = 0..3, on four complex
// inputs presented in parallel (no 1/N factor: the result keeps full bit
// growth). Following the radix-2 Cooley-Tukey split, every twiddle is 1, -1,
// j or -j, so the transform is two stages of signed adders:
//   stage 1: a = x0 + x2, b = x1 + x3, c = x0 - x2, d = x1 - x3
//   stage 2: X0 = a + b, X2 = a - b, X1 = c - j*d, X3 = c + j*d
// with -j*d = Im(d) - j*Re(d), which couples the real and imaginary parts.
//
// PIPE selects 0, 1 or 2 pipeline stages: 0 is purely combinational, 1
// registers the outputs (1 clock latency, the channelizer's default), 2 also
// registers after stage 1 (2 clocks). Outputs are IN_W+2 bits wide; SHIFT
// optionally drops least significant bits. Pipeline registers load every clock
// and carry in_valid along; asynchronous active-low reset clears the valids.
//
// The two adder stages and the choice of 0/1/2 pipeline stages follow the
// method; where the registers sit for PIPE = 1 and 2, and the equations for
// bins 1-3, are worked out here.
module dft4 #(
  parameter int IN_W  = 27,
  parameter int PIPE  = 1,
  parameter int SHIFT = 0,
  localparam int OUT_W = pfb_pkg::scaled_width(IN_W + 2, SHIFT)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re  [4],
  input  logic signed [IN_W-1:0]  in_im  [4],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_re [4],
  output logic signed [OUT_W-1:0] out_im [4]
);

  localparam int S1_W = IN_W + 1;
  localparam int S2_W = IN_W + 2;

  if (PIPE < 0 || PIPE > 2) begin : g_bad_pipe
    $error("dft4: PIPE must be 0, 1 or 2");
  end

  typedef struct packed {
    logic signed [S1_W-1:0] re;
    logic signed [S1_W-1:0] im;
  } s1_t;

  typedef struct packed {
    s1_t a, b, c, d;
  } stage1_t;

  stage1_t s1_comb, s1;
  logic    s1_valid;

  // Stage 1: butterflies between inputs two apart.
  always_comb begin
    s1_comb.a.re = S1_W'(in_re[0]) + S1_W'(in_re[2]);
    s1_comb.a.im = S1_W'(in_im[0]) + S1_W'(in_im[2]);
    s1_comb.b.re = S1_W'(in_re[1]) + S1_W'(in_re[3]);
    s1_comb.b.im = S1_W'(in_im[1]) + S1_W'(in_im[3]);
    s1_comb.c.re = S1_W'(in_re[0]) - S1_W'(in_re[2]);
    s1_comb.c.im = S1_W'(in_im[0]) - S1_W'(in_im[2]);
    s1_comb.d.re = S1_W'(in_re[1]) - S1_W'(in_re[3]);
    s1_comb.d.im = S1_W'(in_im[1]) - S1_W'(in_im[3]);
  end

  if (PIPE == 2) begin : g_s1_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s1_valid <= 1'b0;
        s1       <= '0;
      end else begin
        s1_valid <= in_valid;
        s1       <= s1_comb;
      end
    end
  end else begin : g_s1_comb
    assign s1_valid = in_valid;
    assign s1       = s1_comb;
  end

  // Stage 2: combine; multiplications by -j/+j are swaps with a sign change.
  logic signed [S2_W-1:0] x_re [4];
  logic signed [S2_W-1:0] x_im [4];

  always_comb begin
    x_re[0] = S2_W'(s1.a.re) + S2_W'(s1.b.re);
    x_im[0] = S2_W'(s1.a.im) + S2_W'(s1.b.im);
    x_re[2] = S2_W'(s1.a.re) - S2_W'(s1.b.re);
    x_im[2] = S2_W'(s1.a.im) - S2_W'(s1.b.im);
    x_re[1] = S2_W'(s1.c.re) + S2_W'(s1.d.im);
    x_im[1] = S2_W'(s1.c.im) - S2_W'(s1.d.re);
    x_re[3] = S2_W'(s1.c.re) - S2_W'(s1.d.im);
    x_im[3] = S2_W'(s1.c.im) + S2_W'(s1.d.re);
  end

  if (PIPE >= 1) begin : g_out_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid <= 1'b0;
        for (int k = 0; k < 4; k++) begin
          out_re[k] <= '0;
          out_im[k] <= '0;
        end
      end else begin
        out_valid <= s1_valid;
        for (int k = 0; k < 4; k++) begin
          out_re[k] <= OUT_W'(x_re[k] >>> SHIFT);
          out_im[k] <= OUT_W'(x_im[k] >>> SHIFT);
        end
      end
    end
  end else begin : g_out_comb
    assign out_valid = s1_valid;
    for (genvar k = 0; k < 4; k++) begin : g_k
      assign out_re[k] = OUT_W'(x_re[k] >>> SHIFT);
      assign out_im[k] = OUT_W'(x_im[k] >>> SHIFT);
    end
  end

endmodule
