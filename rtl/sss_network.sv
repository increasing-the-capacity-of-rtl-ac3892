// SSS 8-16-8 network: a 64 x 64 space switch built from three stages.
//
// Stage 1 has 8 space8x16 elements, stage 2 has 16 space8x8 elements and
// stage 3 has 8 space16x8 elements, each with its own 128-word control RAM
// (space_nxm_tot). Output m of first-stage element i feeds input i of
// middle element m; output o of middle element m feeds input m of
// third-stage element o. Network line 8*i + n is input n of first-stage
// element i, and output 8*o + l is output l of third-stage element o. With
// twice as many middle elements as inputs per first-stage element the
// network is non-blocking. The bit path through the three stages is
// combinational.
//
// Control: all RAMs share the address and write-data buses. At q = 3 of
// internal slot j (q = tsc[1:0]) every RAM is read at address j+1, so the
// select words change at the slot boundary. At q = 1 a waiting configuration
// request writes one whole select word (cfg_data, low bits used) into the
// RAM of element cfg_elem of stage cfg_stage (0, 1 or 2) at slot cfg_addr.
// In a select word, bits [i*log2(M) +: log2(M)] give the output of input i.
// The stage sizes and RAM sizes follow the report; the control sequencing
// is this design's own.
module sss_network #(
  parameter int unsigned SLOTS = 128,
  localparam int unsigned SW = $clog2(SLOTS),
  localparam int unsigned TW = SW + 2
) (
  input  logic          clk,
  input  logic [TW-1:0] tsc,
  input  logic [63:0]   in,
  output logic [63:0]   out,
  input  logic          cfg_valid,
  output logic          cfg_ready,
  input  logic [1:0]    cfg_stage,
  input  logic [3:0]    cfg_elem,
  input  logic [SW-1:0] cfg_addr,
  input  logic [47:0]   cfg_data
);

  logic          rd, wr;
  logic [SW-1:0] ram_a;
  logic [15:0]   s1_out [8];    // s1_out[i][m]
  logic [7:0]    s2_in  [16];   // s2_in[m][i]
  logic [7:0]    s2_out [16];   // s2_out[m][o]
  logic [15:0]   s3_in  [8];    // s3_in[o][m]
  logic [7:0]    s3_out [8];

  assign rd        = (tsc[1:0] == 2'd3);
  assign cfg_ready = (tsc[1:0] == 2'd1);
  assign wr        = cfg_valid && cfg_ready;
  assign ram_a     = rd ? (tsc[TW-1:2] + 1'b1) : cfg_addr;

  for (genvar i = 0; i < 8; i++) begin : g_s1
    space_nxm_tot #(.N_IN(8), .N_OUT(16), .WORDS(SLOTS)) u_e (
      .clk, .me(rd || (wr && cfg_stage == 2'd0 && cfg_elem == 4'(i))), .nwe(rd),
      .a(ram_a), .di(cfg_data[31:0]), .in(in[8*i +: 8]), .out(s1_out[i])
    );
  end

  for (genvar m = 0; m < 16; m++) begin : g_s2
    for (genvar i = 0; i < 8; i++) begin : g_w
      assign s2_in[m][i] = s1_out[i][m];
    end
    space_nxm_tot #(.N_IN(8), .N_OUT(8), .WORDS(SLOTS)) u_e (
      .clk, .me(rd || (wr && cfg_stage == 2'd1 && cfg_elem == 4'(m))), .nwe(rd),
      .a(ram_a), .di(cfg_data[23:0]), .in(s2_in[m]), .out(s2_out[m])
    );
  end

  for (genvar o = 0; o < 8; o++) begin : g_s3
    for (genvar m = 0; m < 16; m++) begin : g_w
      assign s3_in[o][m] = s2_out[m][o];
    end
    space_nxm_tot #(.N_IN(16), .N_OUT(8), .WORDS(SLOTS)) u_e (
      .clk, .me(rd || (wr && cfg_stage == 2'd2 && cfg_elem[2:0] == 3'(o) && !cfg_elem[3])),
      .nwe(rd), .a(ram_a), .di(cfg_data), .in(s3_in[o]), .out(s3_out[o])
    );
    assign out[8*o +: 8] = s3_out[o];
  end

  a_cfg_hold: assert property (@(posedge clk)
    cfg_valid && !cfg_ready |=> cfg_valid && $stable({cfg_stage, cfg_elem, cfg_addr, cfg_data}));

endmodule
