// Third-stage time switch element.
//
// The internal line from the space stage carries 2*CH four-bit symbols per
// frame, one bit per clock, most significant bit first. Every symbol is
// written into the data memory RAMD (2*CH words) at the address given by the
// internal slot counter. For each of the CH external slots the connection
// memory CRAM (CH words), read sequentially, gives the RAMD address to read;
// the word read is sent out on the outgoing line during the next external
// slot at the external rate (each bit held for 2 clocks).
//
// Phase plan within an external slot (p = tsc[2:0], 8 clocks):
//   p0, p4  RAMD write (address = current internal slot, data = the symbol
//           received during the previous internal slot)
//   p1      CRAM read (address = current external slot)
//   p2      RAMD read (address = CRAM output)
//   p5      CRAM write from the configuration port, if one is waiting
//   p7      load the output shift register
// Latencies, as in the report: a symbol sent by the first stage's data
// memory in internal slot N arrives during N+1 and is stored at location
// N+2; a word read during external slot M leaves during slot M+1. The exact
// phase plan is this design's own.
//
// Configuration: cfg_valid/cfg_ready handshake as in time_switch_t1;
// cfg_addr is an external slot, cfg_data an internal slot (RAMD location).
module time_switch_t2 #(
  parameter int unsigned CH = 256,
  localparam int unsigned EW = $clog2(CH),
  localparam int unsigned TW = EW + 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [TW-1:0] tsc,
  input  logic          rx,          // internal line, internal rate
  output logic          tx,          // outgoing line, external rate
  input  logic          cfg_valid,
  output logic          cfg_ready,
  input  logic [EW-1:0] cfg_addr,
  input  logic [EW:0]   cfg_data
);
  import tse_pkg::*;

  logic [2:0]    p;
  logic [EW-1:0] eslot;
  logic [EW:0]   islot;
  sym_t          sp, ps, ramd_do;
  logic          ramd_me, ramd_nwe, cram_me, cram_nwe;
  logic [EW:0]   ramd_a, cram_do;
  logic [EW-1:0] cram_a;

  assign p     = tsc[2:0];
  assign eslot = tsc[TW-1:3];
  assign islot = tsc[TW-1:2];

  // Serial to parallel, one bit per clock. At q = 0 sp holds the symbol of
  // the previous internal slot.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sp <= '0;
    else        sp <= {sp[SYM_W-2:0], rx};
  end

  // RAMD: writes at p0 and p4, read at p2.
  always_comb begin
    ramd_me  = (p[1:0] == 2'd0) || (p == 3'd2);
    ramd_nwe = (p == 3'd2);
    ramd_a   = (p == 3'd2) ? cram_do : islot;
  end

  sram_sp #(.WORDS(2*CH), .WIDTH(SYM_W)) u_ramd (
    .clk, .me(ramd_me), .nwe(ramd_nwe), .a(ramd_a), .di(sp), .dout(ramd_do)
  );

  // CRAM: read at p1, configuration write at p5.
  assign cfg_ready = (p == 3'd5);

  always_comb begin
    cram_me  = (p == 3'd1) || (cfg_ready && cfg_valid);
    cram_nwe = (p == 3'd1);
    cram_a   = (p == 3'd1) ? eslot : cfg_addr;
  end

  sram_sp #(.WORDS(CH), .WIDTH(EW+1)) u_cram (
    .clk, .me(cram_me), .nwe(cram_nwe), .a(cram_a), .di(cfg_data), .dout(cram_do)
  );

  // Parallel to serial at the external rate.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          ps <= '0;
    else if (p == 3'd7)  ps <= ramd_do;
    else if (p[0])       ps <= {ps[SYM_W-2:0], 1'b0};
  end

  assign tx = ps[SYM_W-1];

  a_cfg_hold: assert property (@(posedge clk)
    cfg_valid && !cfg_ready |=> cfg_valid && $stable(cfg_addr) && $stable(cfg_data));

endmodule
