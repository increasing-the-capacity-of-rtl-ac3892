// N x N space switch element built from demultiplexers and OR gates.
//
// Each incoming internal line has a 1-to-N demultiplexer and its own
// connection memory (SLOTS words of log2(N) bits). In every internal slot the
// connection memory names the outgoing line the incoming bit stream is sent
// to; each outgoing line is the OR of the N demultiplexer outputs that can
// reach it. The bit path is purely combinational, so the space stage adds no
// delay. The control system must keep the mapping of each slot one-to-one:
// two inputs sent to the same output are ORed together.
//
// Timing: at q = 3 of internal slot j (q = tsc[1:0]) every connection
// memory is read at address j+1, so the select lines change exactly at the
// slot boundary and stay fixed for the 4 bits of slot j+1. Configuration
// writes (cfg_valid/cfg_ready, held until taken) go in at q = 1. The
// demultiplexer/OR structure and the memory per line follow the report; the
// phase plan is this design's own.
module space_switch #(
  parameter int unsigned N     = 16,
  parameter int unsigned SLOTS = 512,
  localparam int unsigned LW = $clog2(N),
  localparam int unsigned SW = $clog2(SLOTS),
  localparam int unsigned TW = SW + 2
) (
  input  logic          clk,
  input  logic [TW-1:0] tsc,
  input  logic [N-1:0]  in,
  output logic [N-1:0]  out,
  input  logic          cfg_valid,
  output logic          cfg_ready,
  input  logic [LW-1:0] cfg_line,   // incoming line whose memory is written
  input  logic [SW-1:0] cfg_addr,   // internal slot
  input  logic [LW-1:0] cfg_data    // outgoing line
);

  logic [1:0]    q;
  logic [SW-1:0] next_slot;
  logic          rd;
  logic [N-1:0]  dmx [N];     // dmx[i][o]: input i routed to output o

  assign q         = tsc[1:0];
  assign next_slot = tsc[TW-1:2] + 1'b1;
  assign rd        = (q == 2'd3);
  assign cfg_ready = (q == 2'd1);

  for (genvar i = 0; i < N; i++) begin : g_in
    logic          we;
    logic [LW-1:0] sel;
    assign we = cfg_valid && cfg_ready && (cfg_line == LW'(i));
    sram_sp #(.WORDS(SLOTS), .WIDTH(LW)) u_cram (
      .clk, .me(rd || we), .nwe(rd), .a(rd ? next_slot : cfg_addr),
      .di(cfg_data), .dout(sel)
    );
    demux_1ton #(.N(N)) u_dmx (.a(in[i]), .s(sel), .y(dmx[i]));
  end

  for (genvar o = 0; o < N; o++) begin : g_out
    logic [N-1:0] col;
    for (genvar i = 0; i < N; i++) begin : g_col
      assign col[i] = dmx[i][o];
    end
    or_n #(.N(N)) u_or (.in(col), .out(out[o]));
  end

  a_cfg_hold: assert property (@(posedge clk)
    cfg_valid && !cfg_ready |=> cfg_valid && $stable(cfg_line)
                                && $stable(cfg_addr) && $stable(cfg_data));

endmodule
