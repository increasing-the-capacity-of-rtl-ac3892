// Mux2: the leaf cell of the parallel time switch element.
//
// Two 4-bit registers form a shift chain: on PIPO0_EN, PAR_IN moves into the
// first and the first into the second; Q is the end of the chain, for the
// next cell. On PIPO1_EN both samples are copied into two frame registers.
// A 4MUX21BUS picks one frame register by SEL and, on PIPO2_EN, the choice is
// clocked into the output register PAR_OUT. SEL = 0 picks the register next
// to PAR_IN (the newer sample), SEL = 1 the older one; that ordering is this
// design's choice. Structure and pin names follow the report. All registers
// share CLK; the enables do the switching.
module ptse_mux2 (
  input  logic       clk,
  input  logic       sel,
  input  logic [3:0] par_in,
  input  logic       pipo0_en,   // shift the input chain
  input  logic       pipo1_en,   // copy the chain into the frame registers
  input  logic       pipo2_en,   // advance the output pipeline
  output logic [3:0] q,          // end of the shift chain
  output logic [3:0] par_out     // selected sample, one register stage
);

  logic [3:0] sh0, sh1, fr0, fr1, mx;

  npipo4bus u_sh0 (.clk(clk), .en(pipo0_en), .d(par_in), .q(sh0));
  npipo4bus u_sh1 (.clk(clk), .en(pipo0_en), .d(sh0),    .q(sh1));
  npipo4bus u_fr0 (.clk(clk), .en(pipo1_en), .d(sh0),    .q(fr0));
  npipo4bus u_fr1 (.clk(clk), .en(pipo1_en), .d(sh1),    .q(fr1));
  mux21x4bus u_mx (.s(sel), .a(fr0), .b(fr1), .y(mx));
  npipo4bus u_out (.clk(clk), .en(pipo2_en), .d(mx),     .q(par_out));

  assign q = sh1;

endmodule
