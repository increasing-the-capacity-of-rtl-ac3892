// First-stage time switch element (the T1data scheme at 4x64 channels).
//
// The incoming line carries CH four-bit symbols per frame at the external
// rate (one bit every 2 clocks, most significant bit first). Each symbol is
// converted to parallel and written into the data memory RAMD at the address
// given by the external slot counter, so RAMD is written sequentially. The
// internal line runs at twice the rate: for each of the 2*CH internal slots
// the connection memory CRAM, read sequentially, gives the RAMD address to
// read, and the word read is sent out serially in the next internal slot.
// One write and two reads of RAMD fit in each external slot, which makes the
// following space stage non-blocking.
//
// Phase plan within an external slot (p = tsc[2:0], 8 clocks):
//   p0  RAMD write (address = current external slot, data = last symbol)
//   p0, p4  CRAM read (address = current internal slot)
//   p1, p5  RAMD read (address = CRAM output)
//   p3, p7  load the output shift register
//   p2, p6  CRAM write from the configuration port, if one is waiting
// Latencies, as in the report: a symbol sent during external slot N-1 is
// stored at RAMD location N; a word read during internal slot M leaves during
// internal slot M+1. The exact phase plan is this design's own.
//
// Configuration: cfg_valid/cfg_ready handshake; cfg_valid and the address
// and data must stay stable until cfg_ready. cfg_addr is an internal slot,
// cfg_data a RAMD location.
module time_switch_t1 #(
  parameter int unsigned CH = 256,
  localparam int unsigned EW = $clog2(CH),        // external slot bits
  localparam int unsigned TW = EW + 3             // tsc width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [TW-1:0] tsc,
  input  logic          rx,          // incoming line, external rate
  output logic          tx,          // internal line, internal rate
  input  logic          cfg_valid,
  output logic          cfg_ready,
  input  logic [EW:0]   cfg_addr,
  input  logic [EW-1:0] cfg_data
);
  import tse_pkg::*;

  logic [2:0]    p;
  logic [EW-1:0] eslot;
  logic [EW:0]   islot;
  sym_t          sp, ps, ramd_do;
  logic          ramd_me, ramd_nwe, cram_me, cram_nwe;
  logic [EW-1:0] ramd_a, cram_do;
  logic [EW:0]   cram_a;

  assign p     = tsc[2:0];
  assign eslot = tsc[TW-1:3];
  assign islot = tsc[TW-1:2];

  // Serial to parallel: sample the line once per external bit.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sp <= '0;
    else if (p[0]) sp <= {sp[SYM_W-2:0], rx};
  end

  // RAMD: write at p0, reads at p1 and p5.
  always_comb begin
    ramd_me  = (p == 3'd0) || (p == 3'd1) || (p == 3'd5);
    ramd_nwe = (p != 3'd0);
    ramd_a   = (p == 3'd0) ? eslot : cram_do;
  end

  sram_sp #(.WORDS(CH), .WIDTH(SYM_W)) u_ramd (
    .clk, .me(ramd_me), .nwe(ramd_nwe), .a(ramd_a), .di(sp), .dout(ramd_do)
  );

  // CRAM: reads at p0 and p4, configuration writes at p2 and p6.
  assign cfg_ready = (p[1:0] == 2'd2);

  always_comb begin
    cram_me  = (p[1:0] == 2'd0) || (cfg_ready && cfg_valid);
    cram_nwe = (p[1:0] == 2'd0);
    cram_a   = (p[1:0] == 2'd0) ? islot : cfg_addr;
  end

  sram_sp #(.WORDS(2*CH), .WIDTH(EW)) u_cram (
    .clk, .me(cram_me), .nwe(cram_nwe), .a(cram_a), .di(cfg_data), .dout(cram_do)
  );

  // Parallel to serial at the internal rate.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               ps <= '0;
    else if (p[1:0] == 2'd3)  ps <= ramd_do;
    else                      ps <= {ps[SYM_W-2:0], 1'b0};
  end

  assign tx = ps[SYM_W-1];

  // Configuration handshake: hold the request until it is taken.
  a_cfg_hold: assert property (@(posedge clk)
    cfg_valid && !cfg_ready |=> cfg_valid && $stable(cfg_addr) && $stable(cfg_data));

endmodule
