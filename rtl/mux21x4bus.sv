// 4MUX21BUS: four 2-to-1 multiplexers on 4-bit buses.
//
// Y = A when S is 0, Y = B when S is 1. Combinational. The pin names follow
// the report; which input S = 1 selects is this design's choice.
module mux21x4bus (
  input  logic       s,
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] y
);

  assign y = s ? b : a;

endmodule
