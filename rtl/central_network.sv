// Central switching network of the (4,2) exchange: four equal TST networks.
//
// A speech sample leaves the (4,2) coder as four 4-bit symbols. Each symbol
// travels through its own TST network (tst_network), so each network is a
// fault isolation area: a fault in one network corrupts one symbol of a
// codeword, which the decoders behind the network can correct. The four
// networks run in lock-step from one clock and reset; each has its own
// lines and its own connection memory port, written by its own slice of the
// control system. The control system normally writes the same connections
// into all four.
//
// Interface: rx[c] / tx[c] are the N lines of network c, in the format of
// tst_network; tsc[c] and frame_start[c] are its slot counter (the four
// counters are equal after reset); the cfg_* ports of network c are
// tst_network's, indexed by c. The four copies and their role follow the
// report; separate configuration ports per copy are this design's choice.
module central_network #(
  parameter int unsigned COPIES = 4,
  parameter int unsigned N      = 16,
  parameter int unsigned CH     = 256,
  localparam int unsigned LW = $clog2(N),
  localparam int unsigned EW = $clog2(CH),
  localparam int unsigned TW = EW + 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         rx          [COPIES],
  output logic [N-1:0]         tx          [COPIES],
  output logic [TW-1:0]        tsc         [COPIES],
  output logic                 frame_start [COPIES],
  input  logic                 cfg_valid   [COPIES],
  output logic                 cfg_ready   [COPIES],
  input  tse_pkg::cfg_target_e cfg_target  [COPIES],
  input  logic [LW-1:0]        cfg_line    [COPIES],
  input  logic [EW:0]          cfg_addr    [COPIES],
  input  logic [EW:0]          cfg_data    [COPIES]
);

  for (genvar c = 0; c < COPIES; c++) begin : g_copy
    tst_network #(.N(N), .CH(CH)) u_tst (
      .clk, .rst_n, .rx(rx[c]), .tx(tx[c]), .tsc(tsc[c]),
      .frame_start(frame_start[c]),
      .cfg_valid(cfg_valid[c]), .cfg_ready(cfg_ready[c]),
      .cfg_target(cfg_target[c]), .cfg_line(cfg_line[c]),
      .cfg_addr(cfg_addr[c]), .cfg_data(cfg_data[c])
    );
  end

endmodule
