// Transpose-form FIR phase filter.
//
// One real-valued branch of the polyphase filter bank. The input sample x is
// broadcast to all TAPS multipliers; the products are summed in an adder chain
// with a register between consecutive adders, so the chain is pipelined by
// construction and no tap delay line is needed at the input. The chain holds
// TAPS-1 registers: the product formed at the head of the chain reaches the
// output TAPS-1 sample steps later, which is the filter's latency in the
// channelizer's latency budget (6 steps for 7 taps).
//
// COEFS is given in impulse-response order p(0)..p(TAPS-1). Chain position i
// (i = 0 at the head, farthest from the output) multiplies by p(TAPS-1-i), so
// y(t) = sum_k p(k) * x(t-k): the product with p(0) enters the last adder and
// the one with p(TAPS-1) enters the first.
//
// Timing: the chain advances only on in_valid, i.e. one step per input sample
// (a clock enable standing in for a slower branch clock). With OUT_REG = 0 the
// output is combinational from x and out_valid = in_valid; OUT_REG = 1 adds the
// optional output register and out_valid follows one clock later.
// Arithmetic keeps full bit growth (DATA_W + COEF_W + clog2(TAPS) bits);
// SHIFT optionally drops least significant bits at the output.
// Reset (asynchronous, active low) clears the chain.
//
// The transpose structure, the TAPS-1 register chain and the optional output
// register are the channelizer method's; the coefficient ordering convention,
// the clock-enable timing, the 16-bit default coefficient width and the reset
// are choices of this design.
module fir_transpose #(
  parameter int DATA_W  = 8,
  parameter int COEF_W  = 16,
  parameter int TAPS    = 7,
  // Default: phase 0 of the 28-tap prototype, p(m) = h(4m); p(6) listed first.
  parameter logic [TAPS-1:0][COEF_W-1:0] COEFS = {16'sd172, -16'sd840, 16'sd3563,
                                                  16'sd6247, -16'sd1177, 16'sd269, -16'sd57},
  parameter bit OUT_REG = 1'b0,
  parameter int SHIFT   = 0,
  localparam int FULL_W = DATA_W + COEF_W + $clog2(TAPS),
  localparam int OUT_W  = pfb_pkg::scaled_width(FULL_W, SHIFT)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  y
);

  // Partial sums after each adder of the chain, and the chain registers.
  logic signed [FULL_W-1:0] sum   [TAPS];
  logic signed [FULL_W-1:0] chain [TAPS-1];

  always_comb begin
    for (int i = 0; i < TAPS; i++) begin
      logic signed [FULL_W-1:0] prod;
      prod = FULL_W'(x) * FULL_W'($signed(COEFS[TAPS-1-i]));
      sum[i] = (i == 0) ? prod : prod + chain[(i == 0) ? 0 : i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS-1; i++) chain[i] <= '0;
    end else if (in_valid) begin
      for (int i = 0; i < TAPS-1; i++) chain[i] <= sum[i];
    end
  end

  if (OUT_REG) begin : g_oreg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid <= 1'b0;
        y         <= '0;
      end else begin
        out_valid <= in_valid;
        if (in_valid) y <= OUT_W'(sum[TAPS-1] >>> SHIFT);
      end
    end
  end else begin : g_ocomb
    assign out_valid = in_valid;
    assign y         = OUT_W'(sum[TAPS-1] >>> SHIFT);
  end

endmodule
