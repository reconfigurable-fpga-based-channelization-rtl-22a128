// Commutator: maps the incoming complex sample stream onto the M polyphase
// branches.
//
// The input arrives as IN_LANES parallel lanes per in_valid beat; within a
// beat lane 0 holds the oldest sample. Samples are numbered k = 0..M-1 within
// a block of M consecutive samples (k = 0 oldest). Following the
// counterclockwise commutator, x_rho(n) = x(nM - rho), the newest sample of a
// block (k = M-1) goes to branch 0 and the oldest (k = 0) to branch M-1, i.e.
// sample k feeds branch M-1-k.
//
// Three cases, chosen by IN_LANES:
//  * IN_LANES == 1: a single serial stream. A beat counter, clocked by the
//    fast input clock clk_in, steers each valid sample into the next slot of
//    the block. A completed block is copied to a holding register and a 2-bit
//    block count advances. The branch side, clocked by clk, sees the count
//    change on its next edge and presents the block with out_valid high for
//    one clk cycle. An assertion flags a block that was overwritten before
//    clk picked it up (count advanced by more than one).
//  * 1 < IN_LANES < M, M a multiple of IN_LANES: remuxing, the same counter
//    collects M/IN_LANES beats per block.
//  * IN_LANES == M: the input is already parallel with one lane per branch;
//    the commutator is only a combinational pass-through that reorders the
//    lanes onto the branches, out_valid = in_valid, in the clk domain (clk_in
//    is unused).
//
// Clocks: clk_in and clk must come from one source with rising edges aligned,
// either the same clock or clk = clk_in divided by M/IN_LANES (e.g. 200 MHz
// in, 50 MHz branches for M = 4). The holding register is stable for a whole
// block, so clk must deliver at least one edge per block: clk >= block rate.
// This is a synchronous multi-rate handover, not a crossing between
// unrelated clocks. With clk == clk_in a block appears two clocks after its
// last sample. The first sample after reset starts a block. Asynchronous
// active-low reset clears the counters and out_valid in both domains.
//
// The counter-driven demultiplexer, the branch order, the commutator running
// on the faster of two clocks and the pass-through for matching lane counts
// follow the method. The remuxing scheme, the block-count handover, the lane order
// and the block alignment are this design's choices.
module commutator #(
  parameter int M        = 4,
  parameter int IN_LANES = 1,
  parameter int DATA_W   = 8
) (
  input  logic                     clk_in,
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_i  [IN_LANES],
  input  logic signed [DATA_W-1:0] in_q  [IN_LANES],
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_i [M],
  output logic signed [DATA_W-1:0] out_q [M]
);

  if (IN_LANES < 1 || IN_LANES > M || M % IN_LANES != 0) begin : g_bad_lanes
    $error("commutator: IN_LANES must divide M");
  end

  if (IN_LANES == M) begin : g_pass
    for (genvar k = 0; k < M; k++) begin : g_k
      assign out_i[M-1-k] = in_i[k];
      assign out_q[M-1-k] = in_q[k];
    end
    assign out_valid = in_valid;

  end else begin : g_demux
    localparam int BEATS = M / IN_LANES;
    localparam int CNT_W = $clog2(BEATS);

    // ---- input side, clk_in ----
    logic [CNT_W-1:0]         beat;
    logic signed [DATA_W-1:0] slot_i [M];
    logic signed [DATA_W-1:0] slot_q [M];
    logic signed [DATA_W-1:0] hold_i [M];
    logic signed [DATA_W-1:0] hold_q [M];
    logic [1:0]               hold_seq;
    logic                     last_beat;

    assign last_beat = (beat == CNT_W'(BEATS-1));

    always_ff @(posedge clk_in or negedge rst_n) begin
      if (!rst_n) begin
        beat     <= '0;
        hold_seq <= '0;
        for (int k = 0; k < M; k++) begin
          slot_i[k] <= '0;
          slot_q[k] <= '0;
          hold_i[k] <= '0;
          hold_q[k] <= '0;
        end
      end else if (in_valid) begin
        beat <= last_beat ? '0 : beat + 1'b1;
        for (int l = 0; l < IN_LANES; l++) begin
          slot_i[int'(beat)*IN_LANES + l] <= in_i[l];
          slot_q[int'(beat)*IN_LANES + l] <= in_q[l];
        end
        if (last_beat) begin
          // Earlier beats come from the slots, the final beat straight from
          // the lanes; sample k goes to branch M-1-k.
          hold_seq <= hold_seq + 2'd1;
          for (int k = 0; k < M - IN_LANES; k++) begin
            hold_i[M-1-k] <= slot_i[k];
            hold_q[M-1-k] <= slot_q[k];
          end
          for (int l = 0; l < IN_LANES; l++) begin
            hold_i[IN_LANES-1-l] <= in_i[l];
            hold_q[IN_LANES-1-l] <= in_q[l];
          end
        end
      end
    end

    // ---- branch side, clk ----
    logic [1:0] seq_seen;
    logic       new_blk;

    assign new_blk = (hold_seq != seq_seen);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        seq_seen  <= '0;
        out_valid <= 1'b0;
        for (int k = 0; k < M; k++) begin
          out_i[k] <= '0;
          out_q[k] <= '0;
        end
      end else begin
        seq_seen  <= hold_seq;
        out_valid <= new_blk;
        if (new_blk) begin
          out_i <= hold_i;
          out_q <= hold_q;
        end
      end
    end

    // clk must take every block before the next one replaces it.
    a_no_lost_block: assert property (@(posedge clk) disable iff (!rst_n)
      2'(hold_seq - seq_seen) <= 2'd1)
      else $error("commutator: clk too slow, a block was overwritten");
  end

endmodule
