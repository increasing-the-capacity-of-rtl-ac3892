// NPIPO4BUS: enable parallel-in parallel-out 4-bit register, bus pins.
//
// Four NFBFF cells with a common clock and enable; D and Q are 4-bit buses.
// Loads D on a clock edge where EN is high, holds otherwise.
module npipo4bus (
  input  logic       clk,
  input  logic       en,
  input  logic [3:0] d,
  output logic [3:0] q
);

  for (genvar i = 0; i < 4; i++) begin : g_bit
    logic nq_unused;
    nfbff u_ff (.clk(clk), .en(en), .d(d[i]), .q(q[i]), .nq(nq_unused));
  end

endmodule
