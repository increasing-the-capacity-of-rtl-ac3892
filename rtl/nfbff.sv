// NFBFF: enable feedback flip-flop.
//
// A D flip-flop with a 2-to-1 multiplexer in front that feeds Q back when EN
// is low, so the cell loads D only on clock edges where EN is high. It also
// gives the inverted output NQ. This is the memory cell of the parallel time
// switch element: all cells share one clock and the enables do the
// switching, as the report describes. No reset, as in the report.
module nfbff (
  input  logic clk,
  input  logic en,
  input  logic d,
  output logic q,
  output logic nq
);

  always_ff @(posedge clk) begin
    if (en) q <= d;
  end

  assign nq = ~q;

endmodule
