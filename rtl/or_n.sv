// N-input OR gate (or16, or8 of the space switch library).
//
// Merges the demultiplexer outputs that lead to one outgoing line. Purely
// combinational; function from the report.
module or_n #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] in,
  output logic         out
);

  assign out = |in;

endmodule
