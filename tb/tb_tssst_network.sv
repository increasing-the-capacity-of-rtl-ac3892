// Testbench for tssst_network at its default size: 64 lines x 64 channels.
//
// A random full permutation of all 4096 (line, slot) inputs onto all
// outputs is set up: each connection gets an internal slot free on both
// lines, the line mapping of every slot is completed to a permutation and
// routed through the three SSS stages, and the connection memories are
// written by the rules of tssst_network. Each input channel carries a fixed
// random symbol; every bit of every outgoing channel is checked for two
// frames.
module tb_tssst_network;
  import tse_pkg::*;
  import tb_route_pkg::*;
  localparam int N = 64, CH = 64, NS = 2 * CH;
  localparam int TW = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] rx, tx;
  logic [TW-1:0] tsc;
  logic frame_start, cfg_valid, cfg_ready;
  cfg_target_e cfg_target;
  logic [5:0] cfg_line;
  logic [1:0] cfg_stage;
  logic [6:0] cfg_addr;
  logic [47:0] cfg_data;

  logic [3:0] data [N][CH];
  int dst [], src_of [], ksl [], smap [];
  int checks = 0, failures = 0, stalls = 0;
  bit checking = 0;

  tssst_network dut (
    .clk, .rst_n, .rx, .tx, .tsc, .frame_start, .cfg_valid, .cfg_ready,
    .cfg_target, .cfg_line, .cfg_stage, .cfg_addr, .cfg_data
  );

  always #5 clk = ~clk;

  for (genvar a = 0; a < N; a++) begin : g_rx
    assign rx[a] = data[a][tsc[TW-1:3]][3 - tsc[2:1]];
  end

  initial begin
    #(10 * 400000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(cfg_target_e tg, int stage, int line, int addr, logic [47:0] d);
    @(negedge clk);
    cfg_valid = 1'b1; cfg_target = tg; cfg_stage = 2'(stage); cfg_line = 6'(line);
    cfg_addr = 7'(addr); cfg_data = d;
    #1;   // sample cfg_ready before the edge that takes the request
    while (!cfg_ready) begin stalls++; @(negedge clk); #1; end
    @(posedge clk);
    #1 cfg_valid = 1'b0;
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
    automatic int sl [] = new[N*CH];
    automatic int dl [] = new[N*CH];
    cfg_valid = 1'b0; cfg_target = CFG_T1; cfg_stage = '0; cfg_line = '0;
    cfg_addr = '0; cfg_data = '0;
    for (int a = 0; a < N; a++) for (int s = 0; s < CH; s++) data[a][s] = 4'($urandom);
    shuffle(N*CH, dst);
    src_of = new[N*CH];
    for (int c = 0; c < N*CH; c++) begin
      src_of[dst[c]] = c; sl[c] = c / CH; dl[c] = dst[c] / CH;
    end
    if (!assign_slots(N, NS, sl, dl, ksl)) begin failures++; $display("slot assignment failed"); end
    smap = new[NS*N];
    foreach (smap[i]) smap[i] = -1;
    for (int c = 0; c < N*CH; c++) smap[((ksl[c] + 1) % NS)*N + sl[c]] = dl[c];
    complete_maps(N, NS, smap);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NS; k++) begin
      automatic int p [] = new[N];
      automatic logic [31:0] s1 [8];
      automatic logic [23:0] s2 [16];
      automatic logic [47:0] s3 [8];
      for (int a = 0; a < N; a++) p[a] = smap[k*N + a];
      if (!clos_route(p, s1, s2, s3)) begin failures++; $display("SSS routing failed"); end
      for (int e = 0; e < 8; e++)  write(CFG_S, 0, e, k, 48'(s1[e]));
      for (int e = 0; e < 16; e++) write(CFG_S, 1, e, k, 48'(s2[e]));
      for (int e = 0; e < 8; e++)  write(CFG_S, 2, e, k, s3[e]);
    end
    for (int c = 0; c < N*CH; c++) begin
      automatic int a = c / CH, s = c % CH, b = dst[c] / CH, t = dst[c] % CH, k = ksl[c];
      write(CFG_T1, 0, a, k, 48'((s + 1) % CH));
      write(CFG_T2, 0, b, (t + CH - 1) % CH, 48'((k + 2) % NS));
    end
    repeat (2 * 8 * CH) @(negedge clk);
    checking = 1;
    repeat (2 * 8 * CH) @(negedge clk);
    checks++;
    if (stalls == 0) begin failures++; $display("no handshake stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
