// Output decimator ("Downsample" stage after the DFT).
//
// Lowers the channel sample rate by FACTOR by keeping one of every FACTOR
// valid output vectors and dropping the others; no band-limiting filter is
// applied, since the filter bank already limits each channel's bandwidth.
// The kept vector is the first of each group of FACTOR (the first valid vector
// after reset is kept). All CH complex channels are decimated together.
// Timing: registered, one clock latency; out_valid pulses once per FACTOR
// in_valid beats. Asynchronous active-low reset clears the counter.
//
// Dropping 7 of 8 samples without filtering is the method's; which sample of
// the group is kept and the output register are this design's choices.
module decimator #(
  parameter int CH     = 4,
  parameter int W      = 16,
  parameter int FACTOR = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_i  [CH],
  input  logic signed [W-1:0] in_q  [CH],
  output logic                out_valid,
  output logic signed [W-1:0] out_i [CH],
  output logic signed [W-1:0] out_q [CH]
);

  localparam int CNT_W = (FACTOR > 1) ? $clog2(FACTOR) : 1;

  logic [CNT_W-1:0] cnt;
  logic             keep;

  assign keep = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      for (int c = 0; c < CH; c++) begin
        out_i[c] <= '0;
        out_q[c] <= '0;
      end
    end else begin
      out_valid <= in_valid && keep;
      if (in_valid) begin
        cnt <= (cnt == CNT_W'(FACTOR-1)) ? '0 : cnt + 1'b1;
        if (keep) begin
          for (int c = 0; c < CH; c++) begin
            out_i[c] <= in_i[c];
            out_q[c] <= in_q[c];
          end
        end
      end
    end
  end

endmodule
