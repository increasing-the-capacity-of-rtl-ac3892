// spaceNxM: space switch element with N incoming and M outgoing lines.
//
// Each incoming line i has a 1-to-M demultiplexer driven by its field of the
// select bus, sel[i*log2(M) +: log2(M)]; each outgoing line is the OR of
// the N demultiplexer outputs that lead to it. Purely combinational.
// Used as space8x16, space8x8 and space16x8 in the SSS network. The select
// bus width N*log2(M) (32, 24, 48 bits) follows the report.
module space_nxm #(
  parameter int unsigned N_IN  = 8,
  parameter int unsigned N_OUT = 16,
  localparam int unsigned LW = $clog2(N_OUT)
) (
  input  logic [N_IN-1:0]    in,
  input  logic [N_IN*LW-1:0] sel,
  output logic [N_OUT-1:0]   out
);

  logic [N_OUT-1:0] dmx [N_IN];

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    demux_1ton #(.N(N_OUT)) u_dmx (.a(in[i]), .s(sel[i*LW +: LW]), .y(dmx[i]));
  end

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    logic [N_IN-1:0] col;
    for (genvar i = 0; i < N_IN; i++) begin : g_col
      assign col[i] = dmx[i][o];
    end
    or_n #(.N(N_IN)) u_or (.in(col), .out(out[o]));
  end

endmodule
