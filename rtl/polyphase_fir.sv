// Polyphase FIR filter bank.
//
// M structurally identical transpose-form phase filters per signal component
// (I and Q), all running in parallel, one per polyphase branch. Branch rho
// filters the branch input x_rho with the phase coefficients
// p_rho(m) = h(m*M + rho), m = 0 .. TAPS/M-1, taken from the prototype lowpass
// h given in COEFS (impulse-response order). The coefficients are real, so I
// and Q are filtered independently by two filters with the same coefficients.
//
// Interface: one parallel vector of M complex branch samples per in_valid;
// the outputs of all 2M filters appear together with out_valid. Latency is that
// of one phase filter: TAPS/M - 1 sample steps through the adder chain, plus
// one clock if OUT_REG is set. Output width keeps full bit growth unless SHIFT
// drops least significant bits.
//
// The phase decomposition and the fully parallel bank follow the method; the
// zero-padding rule for prototypes whose length is not a multiple of M and the
// default coefficient values are this design's own.
module polyphase_fir #(
  parameter int M       = 4,
  parameter int DATA_W  = 8,
  parameter int COEF_W  = 16,
  parameter int TAPS    = 28,
  parameter logic [TAPS-1:0][COEF_W-1:0] COEFS = pfb_pkg::PROTO28,
  parameter bit OUT_REG = 1'b0,
  parameter int SHIFT   = 0,
  localparam int PTAPS  = TAPS / M,
  localparam int OUT_W  = pfb_pkg::scaled_width(DATA_W + COEF_W + $clog2(PTAPS), SHIFT)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_i  [M],
  input  logic signed [DATA_W-1:0] in_q  [M],
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_i [M],
  output logic signed [OUT_W-1:0]  out_q [M]
);

  if (TAPS % M != 0) begin : g_bad_taps
    $error("polyphase_fir: TAPS must be a multiple of M (pad the prototype with zeros)");
  end

  typedef logic [PTAPS-1:0][COEF_W-1:0] phase_coefs_t;

  // Decomposition of the prototype into its M phases, Eq. p_rho(m) = h(mM+rho).
  function automatic phase_coefs_t phase_coefs(int rho);
    phase_coefs_t c;
    for (int m = 0; m < PTAPS; m++) c[m] = COEFS[m*M + rho];
    return c;
  endfunction

  logic [M-1:0] vld_i, vld_q;

  for (genvar rho = 0; rho < M; rho++) begin : g_branch
    localparam phase_coefs_t PC = phase_coefs(rho);

    fir_transpose #(
      .DATA_W (DATA_W), .COEF_W (COEF_W), .TAPS (PTAPS), .COEFS (PC),
      .OUT_REG(OUT_REG), .SHIFT (SHIFT)
    ) u_fir_i (
      .clk, .rst_n, .in_valid,
      .x (in_i[rho]), .out_valid (vld_i[rho]), .y (out_i[rho])
    );

    fir_transpose #(
      .DATA_W (DATA_W), .COEF_W (COEF_W), .TAPS (PTAPS), .COEFS (PC),
      .OUT_REG(OUT_REG), .SHIFT (SHIFT)
    ) u_fir_q (
      .clk, .rst_n, .in_valid,
      .x (in_q[rho]), .out_valid (vld_q[rho]), .y (out_q[rho])
    );
  end

  // All filters share in_valid, so their valids are identical.
  assign out_valid = &{vld_i, vld_q};

endmodule
