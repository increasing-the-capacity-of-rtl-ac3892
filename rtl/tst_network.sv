// 16 x 16 TST switching network with 256 channels per line.
//
// N incoming lines of CH four-bit channels each pass through a first-stage
// time switch (time_switch_t1), an N x N demultiplexer/OR space switch
// (space_switch) working on the 2*CH internal slots, and a third-stage time
// switch (time_switch_t2) per outgoing line. With N = 16 and CH = 256 the
// network switches 4096 half calls, and the doubled number of internal slots
// keeps it non-blocking. One time slot counter drives all elements.
//
// A connection from incoming line a, slot s to outgoing line b, slot t is
// set up through a free internal slot k by three writes:
//   T1[a]  CRAM[k]       = s + 1      (the line side is one slot early)
//   S      CRAM[a][k+1]  = b          (the word is on the wire in slot k+1)
//   T2[b]  CRAM[t-1]     = k + 2      (stored at N+2, sent one slot late)
// all indices modulo the frame size. Slot s of an incoming line is the
// external slot (tsc[TW-1:3]) during which its symbol is on rx, and the same
// holds for tx. The delays follow the report; the rest is this design's.
//
// Configuration port: cfg_target picks the element kind, cfg_line the line
// (for S: the incoming line), cfg_addr and cfg_data as in the elements. One
// request at a time, held until cfg_ready.
module tst_network #(
  parameter int unsigned N  = 16,
  parameter int unsigned CH = 256,
  localparam int unsigned LW = $clog2(N),
  localparam int unsigned EW = $clog2(CH),
  localparam int unsigned TW = EW + 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         rx,
  output logic [N-1:0]         tx,
  output logic [TW-1:0]        tsc,
  output logic                 frame_start,
  input  logic                 cfg_valid,
  output logic                 cfg_ready,
  input  tse_pkg::cfg_target_e cfg_target,
  input  logic [LW-1:0]        cfg_line,
  input  logic [EW:0]          cfg_addr,
  input  logic [EW:0]          cfg_data
);
  import tse_pkg::*;

  logic [N-1:0] mid_in, mid_out;
  logic [N-1:0] t1_ready, t2_ready;
  logic         s_ready;

  tsc_counter #(.W(TW)) u_tsc (
    .clk, .rst_n, .en(1'b1), .tsc, .frame_start
  );

  for (genvar l = 0; l < N; l++) begin : g_line
    logic sel_line;
    assign sel_line = (cfg_line == LW'(l));

    time_switch_t1 #(.CH(CH)) u_t1 (
      .clk, .rst_n, .tsc, .rx(rx[l]), .tx(mid_in[l]),
      .cfg_valid(cfg_valid && cfg_target == CFG_T1 && sel_line),
      .cfg_ready(t1_ready[l]), .cfg_addr(cfg_addr), .cfg_data(cfg_data[EW-1:0])
    );

    time_switch_t2 #(.CH(CH)) u_t2 (
      .clk, .rst_n, .tsc, .rx(mid_out[l]), .tx(tx[l]),
      .cfg_valid(cfg_valid && cfg_target == CFG_T2 && sel_line),
      .cfg_ready(t2_ready[l]), .cfg_addr(cfg_addr[EW-1:0]), .cfg_data(cfg_data)
    );
  end

  space_switch #(.N(N), .SLOTS(2*CH)) u_s (
    .clk, .tsc, .in(mid_in), .out(mid_out),
    .cfg_valid(cfg_valid && cfg_target == CFG_S), .cfg_ready(s_ready),
    .cfg_line, .cfg_addr(cfg_addr), .cfg_data(cfg_data[LW-1:0])
  );

  always_comb begin
    unique case (cfg_target)
      CFG_T1:  cfg_ready = t1_ready[cfg_line];
      CFG_S:   cfg_ready = s_ready;
      CFG_T2:  cfg_ready = t2_ready[cfg_line];
      default: cfg_ready = 1'b1;   // unused code: accepted and dropped
    endcase
  end

endmodule
