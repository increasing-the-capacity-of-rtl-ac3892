// Demultiplexer 1 to N (demux16, demux8 of the space switch library).
//
// The input bit a appears on output y[s]; all other outputs are 0, so the
// outputs of several demultiplexers can be merged with OR gates. Function
// and pin names (A, S, Y) follow the report; purely combinational.
module demux_1ton #(
  parameter int unsigned N = 16,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          a,
  input  logic [SW-1:0] s,
  output logic [N-1:0]  y
);

  always_comb begin
    y = '0;
    y[s] = a;
  end

endmodule
