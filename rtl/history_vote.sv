// history_vote: the decision history of the smart detector. It remembers the
// last DEPTH single-measurement decisions and reports their majority: copy A if
// more of them chose A, copy B if more chose B, ambiguous on a tie.
//
// Rather than adding up DEPTH entries each cycle, an accumulator keeps the
// running tally (+1 per A decision, -1 per B, 0 per ambiguous one). The history
// itself is a circular buffer in block RAM acting as a DEPTH-deep shift register:
// on every push the new decision enters, and once the buffer has filled the
// decision that drops out of the window is subtracted from the tally. The entry
// about to be overwritten is read one clock ahead (synchronous read), with a
// bypass for the case where the next slot is the one written in the same clock
// (only when DEPTH is 1).
//
// Interface: push/decision are sampled on the clock edge; tally and majority
// reflect every decision pushed up to the previous edge (one clock latency).
// Synchronous active-low reset empties the history (tally 0, nothing to drop).
//
// The shift-register history with majority vote and the accumulator follow the
// described design; the circular-buffer realisation is this design's choice.
module history_vote
  import dwc_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         push,
  input  decision_e                    decision,
  output logic signed [$clog2(DEPTH+1):0] tally,
  output decision_e                    majority,
  output logic                         full      // the window holds DEPTH decisions
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int TW = $clog2(DEPTH + 1) + 1;

  logic [1:0]    hist_mem [DEPTH];
  logic [PW-1:0] wr_ptr, wr_ptr_next, rd_addr;
  logic [1:0]    mem_rd_q;
  logic          bypass_q;
  decision_e     bypass_val_q;
  decision_e     oldest;

  always_comb begin
    wr_ptr_next = (wr_ptr == PW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
    rd_addr     = push ? wr_ptr_next : wr_ptr;
    oldest      = bypass_q ? bypass_val_q : decision_e'(mem_rd_q);
  end

  // History storage (no reset: entries are only read once written).
  always_ff @(posedge clk) begin
    if (push) hist_mem[wr_ptr] <= decision;
    mem_rd_q <= hist_mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr       <= '0;
      full         <= 1'b0;
      tally        <= '0;
      bypass_q     <= 1'b0;
      bypass_val_q <= DEC_AMBIG;
    end else begin
      bypass_q     <= push && (rd_addr == wr_ptr);
      bypass_val_q <= decision;
      if (push) begin
        wr_ptr <= wr_ptr_next;
        if (wr_ptr == PW'(DEPTH - 1)) full <= 1'b1;
        tally <= tally + TW'(vote_of(decision)) - (full ? TW'(vote_of(oldest)) : TW'(0));
      end
    end
  end

  always_comb begin
    if (tally > 0)      majority = DEC_A;
    else if (tally < 0) majority = DEC_B;
    else                majority = DEC_AMBIG;
  end

endmodule
