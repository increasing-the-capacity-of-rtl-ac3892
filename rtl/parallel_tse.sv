// Parallel time switch element (the report's Mux32test arrangement).
//
// Instead of a data memory, a frame of N 4-bit samples is shifted into a
// register chain, copied as a whole into frame registers, and read out
// through a pipelined tree of 2-to-1 multiplexers (ptse_muxn). The order of
// the outgoing samples comes from a control RAM that is read sequentially;
// module SEL (ptse_sel) skews its bits to match the pipeline.
//
// Interface: one sample per clock on par_in; frame_start marks input slot 0
// (the internal slot counter is 0). par_out carries outgoing slot out_slot.
// The control RAM holds, for each outgoing slot n, the number of the
// incoming slot (0..N-1, in arrival order) it must carry; cfg_we writes one
// entry in one clock, so a connection changes with a single write.
//
// Timing: the shift chain moves every clock (PIPO0_EN), the frame registers
// load when the counter is 0 (PIPO1_EN), the output pipeline moves every
// clock (PIPO2_EN). Incoming slot i of frame f leaves in outgoing slot n of
// frame f+1, on par_out in the clock where the slot counter equals
// (n + log2(N) + 1) mod N. The enable sequence, the control RAM size (N
// words) and the slot numbering are this design's choices; the report shows
// only the datapath and the need for module SEL.
module parallel_tse #(
  parameter int unsigned N = 32,
  localparam int unsigned L = $clog2(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [3:0]   par_in,
  output logic         frame_start,
  output logic [3:0]   par_out,
  output logic [L-1:0] out_slot,
  input  logic         cfg_we,
  input  logic [L-1:0] cfg_addr,   // outgoing slot
  input  logic [L-1:0] cfg_data    // incoming slot it takes
);

  logic [L-1:0] cnt;
  logic [L-1:0] cram [N];
  logic [L-1:0] cram_rd, sel_pos, sel_skew;
  logic         pipo0_en, pipo1_en, pipo2_en;
  logic [3:0]   q_unused;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  assign frame_start = (cnt == '0);
  assign pipo0_en    = 1'b1;
  assign pipo1_en    = (cnt == '0);
  assign pipo2_en    = 1'b1;

  // Control RAM, written by the control system, read in slot order. The
  // entry for outgoing slot n is applied in the clock where cnt = n + 1.
  always_ff @(posedge clk) begin
    if (cfg_we) cram[cfg_addr] <= cfg_data;
  end
  assign cram_rd = cram[cnt - 1'b1];

  // Incoming slot i sits at chain position N-1-i when the frame is copied.
  assign sel_pos = ~cram_rd;

  ptse_sel #(.L(L)) u_sel (
    .clk, .en(pipo2_en), .sel_in(sel_pos), .sel_out(sel_skew)
  );

  ptse_muxn #(.N(N)) u_mux (
    .clk, .sel(sel_skew), .par_in, .pipo0_en, .pipo1_en, .pipo2_en,
    .q(q_unused), .par_out
  );

  assign out_slot = cnt - L[L-1:0] - 1'b1;

endmodule
