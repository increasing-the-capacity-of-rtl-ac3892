// NPIPO4: enable parallel-in parallel-out 4-bit register, one pin per bit.
//
// Four NFBFF cells with a common clock and enable; loads D0..D3 into
// Q0..Q3 on a clock edge where EN is high, holds otherwise. Same function
// as NPIPO4BUS, with separate bit pins as in the report's symbol.
module npipo4 (
  input  logic clk,
  input  logic en,
  input  logic d0, d1, d2, d3,
  output logic q0, q1, q2, q3
);

  logic [3:0] d, q, nq_unused;
  assign d = {d3, d2, d1, d0};

  for (genvar i = 0; i < 4; i++) begin : g_bit
    nfbff u_ff (.clk(clk), .en(en), .d(d[i]), .q(q[i]), .nq(nq_unused[i]));
  end

  assign {q3, q2, q1, q0} = q;

endmodule
