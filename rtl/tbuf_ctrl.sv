// tbuf_ctrl: control unit of the transpose buffer.
//
// The buffer is an n x n register array (n = 2, 4 or 8 from Sel) that is
// filled and emptied by shifting. The data-flow direction alternates: for
// n shifts vectors enter and leave vertically (along rows), for the next n
// shifts horizontally (along columns), and so on. While a new block enters
// in one direction, the previous block, stored in the other orientation,
// leaves in the same direction, already transposed; a stream of blocks
// therefore passes with no gap. This unit counts the shifts of the current
// phase, flips the direction after every n of them and tells when the
// vector leaving the array belongs to a complete block.
//
// The first block waits for the row unit: the array shifts only when a
// vector arrives, so the start-up delay equals the row unit's latency in
// the active mode. When no vector is arriving, the row unit is empty and
// the array holds a complete block at a phase boundary, the unit empties
// the array by itself (drain): it runs one phase of n shifts with no
// input. The upstream logic must not deliver vectors while `draining` is
// high. The drain and the handshake signals are this implementation's
// additions; the direction switching every 2/4/8 vectors follows the
// design.
//
// Timing: outputs are registered state except `shift` and `out_valid`,
// which are combinational from in_valid for the current cycle.
module tbuf_ctrl
  import mdct_pkg::sel_e, mdct_pkg::block_n;
(
  input  logic       clk,
  input  logic       rst_n,
  input  sel_e       sel,
  input  logic       in_valid,       // a row vector arrives this cycle
  input  logic       upstream_idle,  // nothing more is on its way
  output logic       shift,          // shift the array this cycle
  output logic       dir_h,          // 0: vertical flow, 1: horizontal flow
  output logic       out_valid,      // the vector leaving now is valid
  output logic       draining,
  output logic       full,           // the array holds a complete block
  output logic [2:0] cnt             // shifts done in the current phase
);

  logic [2:0] last;
  logic       drain_start;

  always_comb begin
    last        = 3'(block_n(sel) - 1);
    drain_start = full && (cnt == '0) && !in_valid && upstream_idle;
    shift       = in_valid || draining || drain_start;
    out_valid   = shift && full;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      dir_h    <= 1'b0;
      full     <= 1'b0;
      draining <= 1'b0;
    end else if (shift) begin
      if (drain_start) draining <= 1'b1;
      if (cnt == last) begin
        cnt      <= '0;
        dir_h    <= !dir_h;
        full     <= !(draining || drain_start);
        draining <= 1'b0;
      end else begin
        cnt <= cnt + 3'd1;
      end
    end
  end

  // A drain phase never takes input.
  a_no_input_in_drain : assert property (@(posedge clk) disable iff (!rst_n)
    draining |-> !in_valid);

endmodule
