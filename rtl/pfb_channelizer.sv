// Polyphase filter bank (PFB) channelizer, top level.
//
// Splits a wide-band complex (I/Q) sample stream into M equally spaced
// channels (4 by default), each decimated by M. Instead of mixing, filtering and
// downsampling once per channel, one prototype lowpass h is split into M
// polyphase phase filters that run at the decimated rate, and an M-point DFT
// across the phase-filter outputs shifts the prototype response to every
// channel centre at once:
//
//   in ──> commutator ──> polyphase_fir (2M transpose FIRs) ──> DFT ──>
//          [decimator, optional] ──> out
//
// For M = 4 the DFT is the multiplier-free dft4; for any other M it is
// dft_direct, a direct parallel DFT with rounded constant twiddles (a choice
// of this design: the method only calls for a standard DFT there).
//
// Channel k (k = 0..M-1) is centred at +k*fs/M, wrapping, where fs is the input
// sample rate: y(n,k) = sum_rho y_rho(n) * exp(+j*2*pi*rho*k/M). The DFT
// block computes the standard forward DFT (negative exponent), so channel k is
// read from DFT bin (M-k) mod M.
//
// Configuration (defaults are the evaluated test setup): 4 channels, 8-bit
// samples, a 28-tap prototype (7 taps per phase) and one serial input lane.
// With IN_LANES = M (e.g. an ADC that already delivers 4 parallel streams) the
// commutator reduces to lane reordering. DECIM > 1 appends the output
// decimator used when the channel data must go out over a slower link.
// Outputs keep full bit growth (DATA_W + COEF_W + clog2(TAPS/M) + 2 bits for
// M = 4, + clog2(M) + 1 otherwise) unless FIR_SHIFT / DFT_SHIFT drop least
// significant bits.
//
// Clocks: clk_in drives the input side of the commutator, clk everything from
// the branch vectors on. They come from one source with aligned rising edges:
// either the same clock, or clk = clk_in / (M/IN_LANES), e.g. 200 MHz input
// and 50 MHz filter bank for a serial stream. With IN_LANES = M only clk is
// used.
//
// Timing: one parallel branch vector per M input samples. Measured in clk
// cycles from the branch vector entering the filter bank, the FIR chain takes
// TAPS/M-1 = 6 and the DFT one (DFT_PIPE = 1): 7 cycles in total. There is no
// back-pressure; the design is a pure pipeline driven by valid strobes.
// Asynchronous active-low reset.
//
// The chain, the default sizes, the latency split and the output decimator
// follow the method. The clock-enable timing of the filter bank, the default
// prototype coefficients, the 16-bit coefficient width and the DECIM = 1
// default (no decimator in the main configuration) are this design's own.
module pfb_channelizer #(
  parameter int M           = 4,
  parameter int IN_LANES    = 1,
  parameter int DATA_W      = 8,
  parameter int COEF_W      = 16,
  parameter int TAPS        = 28,
  parameter logic [TAPS-1:0][COEF_W-1:0] COEFS = pfb_pkg::PROTO28,
  parameter bit FIR_OUT_REG = 1'b0,
  parameter int FIR_SHIFT   = 0,
  parameter int DFT_PIPE    = 1,
  parameter int DFT_SHIFT   = 0,
  parameter int DECIM       = 1,
  localparam int FIR_W      = pfb_pkg::scaled_width(DATA_W + COEF_W + $clog2(TAPS / M), FIR_SHIFT),
  localparam int DFT_GROW   = (M == 4) ? 2 : $clog2(M) + 1,
  localparam int OUT_W      = pfb_pkg::scaled_width(FIR_W + DFT_GROW, DFT_SHIFT)
) (
  input  logic                     clk_in,
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_i  [IN_LANES],
  input  logic signed [DATA_W-1:0] in_q  [IN_LANES],
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_i [M],
  output logic signed [OUT_W-1:0]  out_q [M]
);

  // Commutator -> branch vectors.
  logic                     br_valid;
  logic signed [DATA_W-1:0] br_i [M];
  logic signed [DATA_W-1:0] br_q [M];

  commutator #(.M(M), .IN_LANES(IN_LANES), .DATA_W(DATA_W)) u_commutator (
    .clk_in, .clk, .rst_n, .in_valid, .in_i, .in_q,
    .out_valid (br_valid), .out_i (br_i), .out_q (br_q)
  );

  // Polyphase filter bank.
  logic                    ph_valid;
  logic signed [FIR_W-1:0] ph_i [M];
  logic signed [FIR_W-1:0] ph_q [M];

  polyphase_fir #(
    .M (M), .DATA_W (DATA_W), .COEF_W (COEF_W), .TAPS (TAPS), .COEFS (COEFS),
    .OUT_REG (FIR_OUT_REG), .SHIFT (FIR_SHIFT)
  ) u_polyphase_fir (
    .clk, .rst_n, .in_valid (br_valid), .in_i (br_i), .in_q (br_q),
    .out_valid (ph_valid), .out_i (ph_i), .out_q (ph_q)
  );

  // DFT across the phase outputs.
  logic                    dft_valid;
  logic signed [OUT_W-1:0] bin_re [M];
  logic signed [OUT_W-1:0] bin_im [M];

  if (M == 4) begin : g_dft4
    dft4 #(.IN_W (FIR_W), .PIPE (DFT_PIPE), .SHIFT (DFT_SHIFT)) u_dft4 (
      .clk, .rst_n, .in_valid (ph_valid), .in_re (ph_i), .in_im (ph_q),
      .out_valid (dft_valid), .out_re (bin_re), .out_im (bin_im)
    );
  end else begin : g_dft_direct
    dft_direct #(.N (M), .IN_W (FIR_W), .PIPE (DFT_PIPE), .SHIFT (DFT_SHIFT)) u_dft (
      .clk, .rst_n, .in_valid (ph_valid), .in_re (ph_i), .in_im (ph_q),
      .out_valid (dft_valid), .out_re (bin_re), .out_im (bin_im)
    );
  end

  // Channel k is DFT bin (M-k) mod M.
  logic signed [OUT_W-1:0] ch_i [M];
  logic signed [OUT_W-1:0] ch_q [M];

  for (genvar k = 0; k < M; k++) begin : g_ch
    assign ch_i[k] = bin_re[(M - k) % M];
    assign ch_q[k] = bin_im[(M - k) % M];
  end

  if (DECIM > 1) begin : g_decim
    decimator #(.CH (M), .W (OUT_W), .FACTOR (DECIM)) u_decimator (
      .clk, .rst_n, .in_valid (dft_valid), .in_i (ch_i), .in_q (ch_q),
      .out_valid, .out_i, .out_q
    );
  end else begin : g_no_decim
    assign out_valid = dft_valid;
    assign out_i     = ch_i;
    assign out_q     = ch_q;
  end

endmodule
