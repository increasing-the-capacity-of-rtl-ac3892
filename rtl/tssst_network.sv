// TSSST switching network: 64 lines of 64 channels.
//
// Each of the 64 incoming lines has a first-stage time switch
// (time_switch_t1, 64 channels, 128 internal slots); the SSS 8-16-8 network
// (sss_network) is the 64 x 64 space stage; each outgoing line has a
// third-stage time switch (time_switch_t2). 64 x 64 = 4096 half calls, the
// same capacity as the 16 x 16 TST network with 256 channels per line, with
// the space stage's wiring spread over three smaller stages.
//
// A connection from line a, slot s to line b, slot t through internal slot k
// takes: T1[a] CRAM[k] = s+1; in each SSS stage the select field of the
// element on the chosen path at slot k+1 (the space stage adds no delay);
// T2[b] CRAM[t-1] = k+2. Configuration uses one port: cfg_target CFG_T1 and
// CFG_T2 address line cfg_line, CFG_S addresses stage cfg_stage, element
// cfg_line[3:0]. The composition follows the report's TSSST figure; the
// connection rules and port are this design's.
module tssst_network #(
  parameter int unsigned CH = 64,
  localparam int unsigned EW = $clog2(CH),
  localparam int unsigned TW = EW + 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [63:0]          rx,
  output logic [63:0]          tx,
  output logic [TW-1:0]        tsc,
  output logic                 frame_start,
  input  logic                 cfg_valid,
  output logic                 cfg_ready,
  input  tse_pkg::cfg_target_e cfg_target,
  input  logic [5:0]           cfg_line,
  input  logic [1:0]           cfg_stage,
  input  logic [EW:0]          cfg_addr,
  input  logic [47:0]          cfg_data
);
  import tse_pkg::*;

  logic [63:0] mid_in, mid_out, t1_ready, t2_ready;
  logic        s_ready;

  tsc_counter #(.W(TW)) u_tsc (
    .clk, .rst_n, .en(1'b1), .tsc, .frame_start
  );

  for (genvar l = 0; l < 64; l++) begin : g_line
    logic sel_line;
    assign sel_line = (cfg_line == 6'(l));

    time_switch_t1 #(.CH(CH)) u_t1 (
      .clk, .rst_n, .tsc, .rx(rx[l]), .tx(mid_in[l]),
      .cfg_valid(cfg_valid && cfg_target == CFG_T1 && sel_line),
      .cfg_ready(t1_ready[l]), .cfg_addr(cfg_addr), .cfg_data(cfg_data[EW-1:0])
    );

    time_switch_t2 #(.CH(CH)) u_t2 (
      .clk, .rst_n, .tsc, .rx(mid_out[l]), .tx(tx[l]),
      .cfg_valid(cfg_valid && cfg_target == CFG_T2 && sel_line),
      .cfg_ready(t2_ready[l]), .cfg_addr(cfg_addr[EW-1:0]), .cfg_data(cfg_data[EW:0])
    );
  end

  sss_network #(.SLOTS(2*CH)) u_sss (
    .clk, .tsc, .in(mid_in), .out(mid_out),
    .cfg_valid(cfg_valid && cfg_target == CFG_S), .cfg_ready(s_ready),
    .cfg_stage, .cfg_elem(cfg_line[3:0]), .cfg_addr, .cfg_data
  );

  always_comb begin
    unique case (cfg_target)
      CFG_T1:  cfg_ready = t1_ready[cfg_line];
      CFG_S:   cfg_ready = s_ready;
      CFG_T2:  cfg_ready = t2_ready[cfg_line];
      default: cfg_ready = 1'b1;
    endcase
  end

endmodule
