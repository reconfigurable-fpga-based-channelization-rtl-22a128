// Parallel N-point DFT with constant twiddle factors, for channel counts other
// than 4.
//
// Computes X(k) = sum_n x_n * exp(-j*2*pi*n*k/N), k = 0..N-1, on N complex
// inputs presented in parallel, directly from the definition: every output is
// a sum of N constant complex multiplications, (a + jb)(C - jS) =
// (aC + bS) + j(bC - aS) with C = cos(2*pi*m/N), S = sin(2*pi*m/N),
// m = n*k mod N. The twiddles are rounded to TW_W-bit signed fixed point with
// TW_W-2 fractional bits, computed at elaboration. The sums are kept exact and
// the fractional bits are then dropped (arithmetic shift, rounding towards
// minus infinity), so the gain equals that of the 4-point DFT: a constant
// input x on all N inputs gives X(0) = N*x. Outputs are IN_W + clog2(N) + 1
// bits wide (the extra bit covers the complex product's magnitude); SHIFT
// optionally drops further least significant bits.
//
// PIPE = 0 is combinational, PIPE = 1 registers the outputs (one clock, as the
// 4-point DFT's default). Asynchronous active-low reset clears the outputs.
//
// The method only asks for a standard parallel DFT for this stage; this direct
// form (N*N multipliers, simplest rather than cheapest) and its fixed-point
// format are this design's own.
module dft_direct #(
  parameter int N     = 8,
  parameter int IN_W  = 27,
  parameter int TW_W  = 16,
  parameter int PIPE  = 1,
  parameter int SHIFT = 0,
  localparam int FRAC  = TW_W - 2,
  localparam int OUT_W = pfb_pkg::scaled_width(IN_W + $clog2(N) + 1, SHIFT)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re  [N],
  input  logic signed [IN_W-1:0]  in_im  [N],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_re [N],
  output logic signed [OUT_W-1:0] out_im [N]
);

  localparam int ACC_W = IN_W + TW_W + $clog2(N) + 1;

  if (PIPE < 0 || PIPE > 1) begin : g_bad_pipe
    $error("dft_direct: PIPE must be 0 or 1");
  end

  typedef logic signed [TW_W-1:0] tw_t [N];

  // Rounded twiddle table, cos (sel = 0) or sin (sel = 1) of 2*pi*m/N.
  function automatic tw_t make_twiddles(bit sel);
    tw_t t;
    real x;
    for (int m = 0; m < N; m++) begin
      x = 2.0 * 3.141592653589793 * real'(m) / real'(N);
      x = (sel ? $sin(x) : $cos(x)) * real'(1 << FRAC);
      t[m] = TW_W'($rtoi(x + ((x >= 0.0) ? 0.5 : -0.5)));
    end
    return t;
  endfunction

  localparam tw_t COS_T = make_twiddles(1'b0);
  localparam tw_t SIN_T = make_twiddles(1'b1);

  logic signed [OUT_W-1:0] x_re [N];
  logic signed [OUT_W-1:0] x_im [N];

  always_comb begin
    for (int k = 0; k < N; k++) begin
      logic signed [ACC_W-1:0] acc_re, acc_im;
      acc_re = '0;
      acc_im = '0;
      for (int n = 0; n < N; n++) begin
        acc_re += ACC_W'(in_re[n]) * ACC_W'(COS_T[(n*k) % N])
                + ACC_W'(in_im[n]) * ACC_W'(SIN_T[(n*k) % N]);
        acc_im += ACC_W'(in_im[n]) * ACC_W'(COS_T[(n*k) % N])
                - ACC_W'(in_re[n]) * ACC_W'(SIN_T[(n*k) % N]);
      end
      x_re[k] = OUT_W'(acc_re >>> (FRAC + SHIFT));
      x_im[k] = OUT_W'(acc_im >>> (FRAC + SHIFT));
    end
  end

  if (PIPE == 1) begin : g_out_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid <= 1'b0;
        for (int k = 0; k < N; k++) begin
          out_re[k] <= '0;
          out_im[k] <= '0;
        end
      end else begin
        out_valid <= in_valid;
        out_re    <= x_re;
        out_im    <= x_im;
      end
    end
  end else begin : g_out_comb
    assign out_valid = in_valid;
    assign out_re    = x_re;
    assign out_im    = x_im;
  end

endmodule
