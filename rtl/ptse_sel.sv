// Module SEL: skews the SEL bus of the parallel time switch element.
//
// The multiplexer tree uses SEL bit k one pipeline step after bit k-1. So
// that the control RAM can hold the plain slot number of each outgoing slot
// (and a connection is changed with one write), bit k of the word read from
// the control RAM is delayed by k steps of the output pipeline (clock edges
// with en high). Bit 0 passes straight through. The purpose follows the
// report; the shift-register form is this design's.
module ptse_sel #(
  parameter int unsigned L = 5
) (
  input  logic         clk,
  input  logic         en,
  input  logic [L-1:0] sel_in,
  output logic [L-1:0] sel_out
);

  assign sel_out[0] = sel_in[0];

  for (genvar k = 1; k < L; k++) begin : g_bit
    localparam int unsigned K = k;
    logic [K-1:0] dly;   // dly[K-1] is bit k delayed by k steps
    always_ff @(posedge clk) begin
      if (en) dly <= K'({dly, sel_in[k]});
    end
    assign sel_out[k] = dly[K-1];
  end

endmodule
