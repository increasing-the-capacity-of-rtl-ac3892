// Testbench for tst_network at its default size: 16 lines x 256 channels.
//
// Sets up 4096 connections at once, a random full permutation of all
// (line, slot) inputs onto all (line, slot) outputs: every connection gets
// an internal slot free on its incoming and outgoing line, the space
// mappings of every slot are completed to permutations, and the three
// connection memories are written by the rules of tst_network. Each input
// channel carries a fixed random symbol every frame; after set-up every bit
// of every outgoing channel is checked for two frames. Then 64 connections
// are torn down and set up again to new destinations, and checked again.
module tb_tst_network;
  import tse_pkg::*;
  import tb_route_pkg::*;
  localparam int N = 16, CH = 256, NS = 2 * CH;
  localparam int TW = 11;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] rx, tx;
  logic [TW-1:0] tsc;
  logic frame_start, cfg_valid, cfg_ready;
  cfg_target_e cfg_target;
  logic [3:0] cfg_line;
  logic [8:0] cfg_addr, cfg_data;

  logic [3:0] data [N][CH];
  int dst [];            // dst[a*CH+s] = b*CH+t
  int src_of [];         // inverse
  int ksl [];
  int smap [];
  int checks = 0, failures = 0, stalls = 0, writes = 0;
  bit checking = 0;

  tst_network dut (
    .clk, .rst_n, .rx, .tx, .tsc, .frame_start, .cfg_valid, .cfg_ready,
    .cfg_target, .cfg_line, .cfg_addr, .cfg_data
  );

  always #5 clk = ~clk;

  // line side: symbol of external slot e on rx, bit b in phases 2b, 2b+1
  for (genvar a = 0; a < N; a++) begin : g_rx
    assign rx[a] = data[a][tsc[TW-1:3]][3 - tsc[2:1]];
  end

  initial begin
    #(10 * 400000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(cfg_target_e tg, int line, int addr, int d);
    @(negedge clk);
    cfg_valid = 1'b1; cfg_target = tg; cfg_line = 4'(line);
    cfg_addr = 9'(addr); cfg_data = 9'(d);
    #1;   // sample cfg_ready before the edge that takes the request
    while (!cfg_ready) begin stalls++; @(negedge clk); #1; end
    @(posedge clk);
    #1 cfg_valid = 1'b0;
    writes++;
  endtask

  task automatic route_all();
    int sl [] = new[N*CH];
    int dl [] = new[N*CH];
    for (int c = 0; c < N*CH; c++) begin sl[c] = c / CH; dl[c] = dst[c] / CH; end
    if (!assign_slots(N, NS, sl, dl, ksl)) begin failures++; $display("slot assignment failed"); end
    smap = new[NS*N];
    foreach (smap[i]) smap[i] = -1;
    for (int c = 0; c < N*CH; c++) smap[((ksl[c] + 1) % NS)*N + sl[c]] = dl[c];
    complete_maps(N, NS, smap);
  endtask

  task automatic write_conn(int c);
    int a = c / CH, s = c % CH, b = dst[c] / CH, t = dst[c] % CH, k = ksl[c];
    write(CFG_T1, a, k, (s + 1) % CH);
    write(CFG_T2, b, (t + CH - 1) % CH, (k + 2) % NS);
  endtask

  always @(negedge clk) begin
    if (checking) begin
      automatic int t = int'(tsc[TW-1:3]);
      automatic int bit_i = 3 - int'(tsc[2:1]);
      for (int b = 0; b < N; b++) begin
        automatic int c = src_of[b*CH + t];
        automatic logic e = data[c / CH][c % CH][bit_i];
        checks++;
        if (tx[b] !== e) begin
          failures++;
          if (failures < 10) $display("tsc %0d line %0d slot %0d: tx=%b exp=%b", tsc, b, t, tx[b], e);
        end
      end
    end
  end

  initial begin
    cfg_valid = 1'b0; cfg_target = CFG_T1; cfg_line = '0; cfg_addr = '0; cfg_data = '0;
    for (int a = 0; a < N; a++) for (int s = 0; s < CH; s++) data[a][s] = 4'($urandom);
    shuffle(N*CH, dst);
    src_of = new[N*CH];
    for (int c = 0; c < N*CH; c++) src_of[dst[c]] = c;
    route_all();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NS; k++) for (int a = 0; a < N; a++) write(CFG_S, a, k, smap[k*N + a]);
    for (int c = 0; c < N*CH; c++) write_conn(c);
    repeat (2 * 8 * CH) @(negedge clk);
    checking = 1;
    repeat (2 * 8 * CH) @(negedge clk);
    checking = 0;
    // tear down and re-route: swap destinations of 64 random connection pairs
    // and route everything again (the new slot plan rewrites all memories)
    for (int r = 0; r < 32; r++) begin
      automatic int x = int'($urandom % (N*CH)), y = int'($urandom % (N*CH)), tmp;
      tmp = dst[x]; dst[x] = dst[y]; dst[y] = tmp;
    end
    for (int c = 0; c < N*CH; c++) src_of[dst[c]] = c;
    route_all();
    for (int k = 0; k < NS; k++) for (int a = 0; a < N; a++) write(CFG_S, a, k, smap[k*N + a]);
    for (int c = 0; c < N*CH; c++) write_conn(c);
    repeat (2 * 8 * CH) @(negedge clk);
    checking = 1;
    repeat (8 * CH) @(negedge clk);
    checks++;
    if (stalls == 0) begin failures++; $display("no handshake stall seen"); end
    $display("writes=%0d stalls=%0d", writes, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
