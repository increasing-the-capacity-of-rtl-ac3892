// spaceNxMtot: an N x M space switch element together with its control RAM.
//
// The control RAM holds one select word of N*log2(M) bits per internal time
// slot (WORDS = 128 slots). Its output drives the select bus of the
// space_nxm element directly, so the element switches whatever the RAM read
// last. The RAM pins ME, NWE, A and DI are brought out as in the report's
// symbols: an outside controller reads the RAM once per slot (ME = 1,
// NWE = 1, A = slot) so that the new word appears at the slot boundary, and
// writes it (ME = 1, NWE = 0) in between. The RAM generator's self-test pins
// of the report's symbols are not modelled.
module space_nxm_tot #(
  parameter int unsigned N_IN  = 8,
  parameter int unsigned N_OUT = 16,
  parameter int unsigned WORDS = 128,
  localparam int unsigned SELW = N_IN * $clog2(N_OUT),
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             me,
  input  logic             nwe,
  input  logic [AW-1:0]    a,
  input  logic [SELW-1:0]  di,
  input  logic [N_IN-1:0]  in,
  output logic [N_OUT-1:0] out
);

  logic [SELW-1:0] sel;

  sram_sp #(.WORDS(WORDS), .WIDTH(SELW)) u_ram (
    .clk, .me, .nwe, .a, .di, .dout(sel)
  );

  space_nxm #(.N_IN(N_IN), .N_OUT(N_OUT)) u_sw (.in, .sel, .out);

endmodule
