// Time slot counter.
//
// A free-running binary counter, one count per clock, that all elements of a
// network share. Its low bits give the bit and phase within a time slot, its
// high bits the slot number (see tse_pkg). The count wraps at the end of a
// frame. frame_start is high in the first clock of every frame. Reset clears
// the count; en stops it. That a single counter addresses the data and
// connection memories follows the report; reset and enable are this
// design's choices.
module tsc_counter #(
  parameter int unsigned W = 11
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] tsc,
  output logic         frame_start
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  tsc <= '0;
    else if (en) tsc <= tsc + 1'b1;
  end

  assign frame_start = (tsc == '0);

endmodule
