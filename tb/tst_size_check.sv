// Checker for one tst_network of N lines x CH channels, used by
// tb_tst_network_sizes.
//
// Sets up a random full permutation of all N*CH (line, slot) inputs onto
// all outputs through the connection memory port (internal slots by edge
// colouring, space mappings completed to permutations), then checks every
// bit of every outgoing channel for two frames against the symbol sent in
// the connected incoming channel. Raises done at the end.
module tst_size_check #(
  parameter int unsigned N  = 16,
  parameter int unsigned CH = 256
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   stalls,
  output logic done
);
  import tse_pkg::*;
  import tb_route_pkg::*;
  localparam int NS = 2 * CH;
  localparam int LW = $clog2(N), EW = $clog2(CH), TW = EW + 3;

  logic rst_n = 1'b0;
  logic [N-1:0] rx, tx;
  logic [TW-1:0] tsc;
  logic frame_start, cfg_valid, cfg_ready;
  cfg_target_e cfg_target;
  logic [LW-1:0] cfg_line;
  logic [EW:0] cfg_addr, cfg_data;
  logic [3:0] data [N][CH];
  int dst [], src_of [], ksl [], smap [];
  bit checking = 0;

  tst_network #(.N(N), .CH(CH)) dut (
    .clk, .rst_n, .rx, .tx, .tsc, .frame_start, .cfg_valid, .cfg_ready,
    .cfg_target, .cfg_line, .cfg_addr, .cfg_data
  );

  for (genvar a = 0; a < N; a++) begin : g_rx
    assign rx[a] = data[a][tsc[TW-1:3]][3 - tsc[2:1]];
  end

  task automatic write(cfg_target_e tg, int line, int addr, int d);
    @(negedge clk);
    cfg_valid = 1'b1; cfg_target = tg; cfg_line = LW'(line);
    cfg_addr = (EW+1)'(addr); cfg_data = (EW+1)'(d);
    #1;
    while (!cfg_ready) begin stalls++; @(negedge clk); #1; end
    @(posedge clk);
    #1 cfg_valid = 1'b0;
  endtask

  always @(negedge clk) begin
    if (checking) begin
      automatic int t = int'(tsc[TW-1:3]);
      automatic int bi = 3 - int'(tsc[2:1]);
      for (int b = 0; b < int'(N); b++) begin
        automatic int c = src_of[b*CH + t];
        checks++;
        if (tx[b] !== data[c / CH][c % CH][bi]) begin
          failures++;
          if (failures < 5) $display("%0dx%0d: tsc %0d line %0d slot %0d wrong", N, CH, tsc, b, t);
        end
      end
    end
  end

  initial begin
    automatic int sl [] = new[N*CH];
    automatic int dl [] = new[N*CH];
    checks = 0; failures = 0; stalls = 0; done = 1'b0;
    cfg_valid = 1'b0; cfg_target = CFG_T1; cfg_line = '0; cfg_addr = '0; cfg_data = '0;
    for (int a = 0; a < int'(N); a++) for (int s = 0; s < int'(CH); s++) data[a][s] = 4'($urandom);
    shuffle(N*CH, dst);
    src_of = new[N*CH];
    for (int c = 0; c < int'(N*CH); c++) begin
      src_of[dst[c]] = c; sl[c] = c / CH; dl[c] = dst[c] / CH;
    end
    if (!assign_slots(N, NS, sl, dl, ksl)) begin failures++; $display("slot assignment failed"); end
    smap = new[NS*N];
    foreach (smap[i]) smap[i] = -1;
    for (int c = 0; c < int'(N*CH); c++) smap[((ksl[c] + 1) % NS)*N + sl[c]] = dl[c];
    complete_maps(N, NS, smap);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NS; k++) for (int a = 0; a < int'(N); a++) write(CFG_S, a, k, smap[k*N + a]);
    for (int c = 0; c < int'(N*CH); c++) begin
      automatic int a = c / CH, s = c % CH, b = dst[c] / CH, t = dst[c] % CH, k = ksl[c];
      write(CFG_T1, a, k, (s + 1) % CH);
      write(CFG_T2, b, (t + CH - 1) % CH, (k + 2) % NS);
    end
    repeat (2 * 8 * CH) @(negedge clk);
    checking = 1;
    repeat (2 * 8 * CH) @(negedge clk);
    checking = 0;
    done = 1'b1;
  end
endmodule
