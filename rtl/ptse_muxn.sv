// MuxN: N-slot stage of the parallel time switch element (Mux4 ... Mux64).
//
// In the report a MuxN is two MuxN/2 cells whose shift chains are joined,
// a 4MUX21BUS choosing between their outputs with the top SEL bit, and a
// register loaded on PIPO2_EN. Unrolled, that is what is built here: N/2
// Mux2 leaves whose shift chains run PAR_IN -> leaf 0 -> ... -> leaf N/2-1
// -> Q, and above them a binary tree of log2(N)-1 levels of 2-to-1
// multiplexers, each followed by an enabled register. SEL is the position in
// the shift chain, 0 being the register next to PAR_IN; the lower half of
// the chain is chosen when the top SEL bit is 0.
//
// Timing: every level adds one PIPO2_EN register, so SEL bit k must be
// presented k enabled clocks after bit 0 (module SEL does this); a choice
// reaches PAR_OUT log2(N) enabled clocks after bit 0 was applied.
module ptse_muxn #(
  parameter int unsigned N = 32,
  localparam int unsigned L = $clog2(N)
) (
  input  logic         clk,
  input  logic [L-1:0] sel,
  input  logic [3:0]   par_in,
  input  logic         pipo0_en,
  input  logic         pipo1_en,
  input  logic         pipo2_en,
  output logic [3:0]   q,
  output logic [3:0]   par_out
);

  // node[lv][k]: registered output of tree node k at level lv (lv = 1 are
  // the Mux2 leaves, lv = L the root).
  logic [3:0] node  [1:L][N/2];
  logic [3:0] chain [N/2+1];

  assign chain[0] = par_in;

  for (genvar k = 0; k < N/2; k++) begin : g_leaf
    ptse_mux2 u_mux2 (
      .clk, .sel(sel[0]), .par_in(chain[k]), .pipo0_en, .pipo1_en, .pipo2_en,
      .q(chain[k+1]), .par_out(node[1][k])
    );
  end

  assign q = chain[N/2];

  for (genvar lv = 2; lv <= L; lv++) begin : g_lvl
    for (genvar k = 0; k < (N >> lv); k++) begin : g_node
      logic [3:0] mx;
      mux21x4bus u_mx (
        .s(sel[lv-1]), .a(node[lv-1][2*k]), .b(node[lv-1][2*k+1]), .y(mx)
      );
      npipo4bus u_reg (.clk, .en(pipo2_en), .d(mx), .q(node[lv][k]));
    end
    for (genvar k = (N >> lv); k < N/2; k++) begin : g_pad
      assign node[lv][k] = '0;
    end
  end

  assign par_out = node[L][0];

endmodule
