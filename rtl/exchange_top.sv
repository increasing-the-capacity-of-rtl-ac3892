// Switching network designs for a (4,2) fault tolerant digital exchange.
//
// Four independent designs stand side by side, each with its own ports:
//   tst_*    the central switching network: four equal 16 x 16 TST
//            networks with 256 channels per line (4096 half calls), one per
//            symbol of the (4,2) codeword, each indexed [0..3] on the ports.
//            Time switches at four times the prototype's capacity around a
//            demultiplexer/OR space switch. This is the main configuration.
//   tssst_*  the TSSST network: 64 lines of 64 channels, with the SSS 8-16-8
//            network as its 64 x 64 space stage.
//   ptse_*   the parallel (pipelined) time switch element for 32 slots.
//   tsb_*    the 4 x 4 time-shared bus space switch element, with its own
//            time slot counter.
// The connection memories are written by a control system outside this
// module through the cfg ports; the (4,2) coders and decoders and the PCM
// synchronisation sit outside too, on the rx/tx lines. See the submodules
// for the timing of each port.
module exchange_top (
  input  logic                 clk,
  input  logic                 rst_n,

  // central network: 4 x (16 x 16 TST network)
  input  logic [15:0]          tst_rx          [4],
  output logic [15:0]          tst_tx          [4],
  output logic [10:0]          tst_tsc         [4],
  output logic                 tst_frame_start [4],
  input  logic                 tst_cfg_valid   [4],
  output logic                 tst_cfg_ready   [4],
  input  tse_pkg::cfg_target_e tst_cfg_target  [4],
  input  logic [3:0]           tst_cfg_line    [4],
  input  logic [8:0]           tst_cfg_addr    [4],
  input  logic [8:0]           tst_cfg_data    [4],

  // TSSST network
  input  logic [63:0]          tssst_rx,
  output logic [63:0]          tssst_tx,
  output logic [8:0]           tssst_tsc,
  output logic                 tssst_frame_start,
  input  logic                 tssst_cfg_valid,
  output logic                 tssst_cfg_ready,
  input  tse_pkg::cfg_target_e tssst_cfg_target,
  input  logic [5:0]           tssst_cfg_line,
  input  logic [1:0]           tssst_cfg_stage,
  input  logic [6:0]           tssst_cfg_addr,
  input  logic [47:0]          tssst_cfg_data,

  // parallel time switch element
  input  logic [3:0]           ptse_par_in,
  output logic                 ptse_frame_start,
  output logic [3:0]           ptse_par_out,
  output logic [4:0]           ptse_out_slot,
  input  logic                 ptse_cfg_we,
  input  logic [4:0]           ptse_cfg_addr,
  input  logic [4:0]           ptse_cfg_data,

  // time-shared bus space switch
  input  tse_pkg::sym_t        tsb_in_word  [4],
  output tse_pkg::sym_t        tsb_out_word [4],
  output logic [8:0]           tsb_tsc,
  output logic                 tsb_frame_start,
  input  logic                 tsb_cfg_valid,
  input  logic [6:0]           tsb_cfg_slot,
  input  logic [1:0]           tsb_cfg_turn,
  input  logic [1:0]           tsb_cfg_data
);

  central_network u_central (
    .clk, .rst_n, .rx(tst_rx), .tx(tst_tx), .tsc(tst_tsc),
    .frame_start(tst_frame_start),
    .cfg_valid(tst_cfg_valid), .cfg_ready(tst_cfg_ready),
    .cfg_target(tst_cfg_target), .cfg_line(tst_cfg_line),
    .cfg_addr(tst_cfg_addr), .cfg_data(tst_cfg_data)
  );

  tssst_network u_tssst (
    .clk, .rst_n, .rx(tssst_rx), .tx(tssst_tx), .tsc(tssst_tsc),
    .frame_start(tssst_frame_start),
    .cfg_valid(tssst_cfg_valid), .cfg_ready(tssst_cfg_ready),
    .cfg_target(tssst_cfg_target), .cfg_line(tssst_cfg_line),
    .cfg_stage(tssst_cfg_stage), .cfg_addr(tssst_cfg_addr),
    .cfg_data(tssst_cfg_data)
  );

  parallel_tse u_ptse (
    .clk, .rst_n, .par_in(ptse_par_in), .frame_start(ptse_frame_start),
    .par_out(ptse_par_out), .out_slot(ptse_out_slot),
    .cfg_we(ptse_cfg_we), .cfg_addr(ptse_cfg_addr), .cfg_data(ptse_cfg_data)
  );

  tsc_counter #(.W(9)) u_tsb_tsc (
    .clk, .rst_n, .en(1'b1), .tsc(tsb_tsc), .frame_start(tsb_frame_start)
  );

  tsb_space_switch u_tsb (
    .clk, .rst_n, .tsc(tsb_tsc), .in_word(tsb_in_word), .out_word(tsb_out_word),
    .cfg_valid(tsb_cfg_valid),
    .cfg_slot(tsb_cfg_slot), .cfg_turn(tsb_cfg_turn), .cfg_data(tsb_cfg_data)
  );

endmodule
