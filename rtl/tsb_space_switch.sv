// Time-shared bus space switch element (N x N, N = 4).
//
// Instead of wiring every incoming line to every outgoing line, the N
// incoming words of an internal time slot take turns on one 4-bit bus. In
// bus turn k (k = tsc[1:0], one turn per clock) buffer k drives the bus
// (the MUXS signal counts 0..N-1) and the control RAM names the output
// register that loads the bus (the DEMUX signal). After the last turn the N
// output registers are copied to out_word, which holds them for the whole
// next slot. An output that no input was sent to in a slot gives 0.
//
// Interface: in_word[i] must hold incoming line i's word for the whole
// internal slot j; out_word[o] carries slot j's result during slot j+1. The
// control RAM has SLOTS*N entries of log2(N) bits, address {slot, turn}; it
// is read every clock and can be written in any clock through cfg_valid
// (a write needs no handshake, as it never waits), matching the report's read and write
// of the control memory within each 244 ns bus turn. The report's element
// runs 4 turns per slot of 4 bits, so one turn per bit clock as here. Which
// signal counts and which comes from RAM, and the zero for idle outputs,
// are this design's choices. The output registers are NPIPO4 cells (4-bit
// enable registers with separate bit pins) on the bus lines; they are not
// reset, as the loaded flags decide whether their contents are used.
module tsb_space_switch #(
  parameter int unsigned N     = 4,
  parameter int unsigned SLOTS = 128,
  localparam int unsigned LW = $clog2(N),
  localparam int unsigned SW = $clog2(SLOTS),
  localparam int unsigned TW = SW + LW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [TW-1:0]    tsc,
  input  tse_pkg::sym_t    in_word  [N],
  output tse_pkg::sym_t    out_word [N],
  input  logic             cfg_valid,
  input  logic [SW-1:0]    cfg_slot,
  input  logic [LW-1:0]    cfg_turn,   // incoming line (bus turn)
  input  logic [LW-1:0]    cfg_data    // output register it is sent to
);
  import tse_pkg::*;

  logic [LW-1:0] cram [SLOTS*N];
  logic [LW-1:0] muxs, demux;
  sym_t          bus;
  sym_t          regs     [N];
  sym_t          regs_nxt [N];
  logic [N-1:0]  load, loaded, loaded_nxt;

  assign muxs  = tsc[LW-1:0];
  assign demux = cram[tsc];
  assign bus   = in_word[muxs];

  always_ff @(posedge clk) begin
    if (cfg_valid) cram[{cfg_slot, cfg_turn}] <= cfg_data;
  end

  // Output registers on the bus: register o loads when DEMUX names it.
  for (genvar o = 0; o < N; o++) begin : g_reg
    assign load[o]       = (demux == LW'(o));
    assign regs_nxt[o]   = load[o] ? bus : regs[o];
    assign loaded_nxt[o] = loaded[o] || load[o];
    npipo4 u_reg (
      .clk, .en(load[o]),
      .d0(bus[0]), .d1(bus[1]), .d2(bus[2]), .d3(bus[3]),
      .q0(regs[o][0]), .q1(regs[o][1]), .q2(regs[o][2]), .q3(regs[o][3])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_word <= '{default: '0};
      loaded   <= '0;
    end else if (muxs == LW'(N-1)) begin
      for (int o = 0; o < N; o++) out_word[o] <= loaded_nxt[o] ? regs_nxt[o] : '0;
      loaded <= '0;
    end else begin
      loaded <= loaded_nxt;
    end
  end

endmodule
