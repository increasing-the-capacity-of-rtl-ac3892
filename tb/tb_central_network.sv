// Testbench for central_network at reduced size: 4 copies of a 4-line,
// 64-channel TST network.
//
// Each copy gets its own random full permutation and its own symbols, and
// its four connection memory ports are written in parallel, so a write that
// reached the wrong copy, or a copy that followed another's counter, shows
// up. Every bit of every outgoing channel of every copy is checked for two
// frames. The four slot counters must stay equal.
module tb_central_network;
  import tse_pkg::*;
  import tb_route_pkg::*;
  localparam int C = 4, N = 4, CH = 64, NS = 2 * CH;
  localparam int LW = 2, EW = 6, TW = EW + 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] rx [C], tx [C];
  logic [TW-1:0] tsc [C];
  logic frame_start [C], cfg_valid [C], cfg_ready [C];
  cfg_target_e cfg_target [C];
  logic [LW-1:0] cfg_line [C];
  logic [EW:0] cfg_addr [C], cfg_data [C];

  logic [3:0] data [C][N][CH];
  int dst [C][], src_of [C][], ksl [C][], smap [C][];
  int checks = 0, failures = 0, stalls = 0, tsc_diff = 0;
  bit checking = 0;

  central_network #(.COPIES(C), .N(N), .CH(CH)) dut (.*);

  always #5 clk = ~clk;

  for (genvar c = 0; c < C; c++) begin : g_c
    for (genvar a = 0; a < N; a++) begin : g_rx
      assign rx[c][a] = data[c][a][tsc[c][TW-1:3]][3 - tsc[c][2:1]];
    end
  end

  initial begin
    #(10 * 400000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int c, cfg_target_e tg, int line, int addr, int d);
    @(negedge clk);
    cfg_valid[c] = 1'b1; cfg_target[c] = tg; cfg_line[c] = LW'(line);
    cfg_addr[c] = (EW+1)'(addr); cfg_data[c] = (EW+1)'(d);
    #1;
    while (!cfg_ready[c]) begin stalls++; @(negedge clk); #1; end
    @(posedge clk);
    #1 cfg_valid[c] = 1'b0;
  endtask

  task automatic setup_copy(int c);
    int sl [] = new[N*CH];
    int dl [] = new[N*CH];
    shuffle(N*CH, dst[c]);
    src_of[c] = new[N*CH];
    for (int x = 0; x < N*CH; x++) begin
      src_of[c][dst[c][x]] = x; sl[x] = x / CH; dl[x] = dst[c][x] / CH;
    end
    if (!assign_slots(N, NS, sl, dl, ksl[c])) begin failures++; $display("slot assignment failed"); end
    smap[c] = new[NS*N];
    foreach (smap[c][i]) smap[c][i] = -1;
    for (int x = 0; x < N*CH; x++) smap[c][((ksl[c][x] + 1) % NS)*N + sl[x]] = dl[x];
    complete_maps(N, NS, smap[c]);
    for (int k = 0; k < NS; k++) for (int a = 0; a < N; a++) write(c, CFG_S, a, k, smap[c][k*N + a]);
    for (int x = 0; x < N*CH; x++) begin
      automatic int a = x / CH, s = x % CH, b = dst[c][x] / CH, t = dst[c][x] % CH, k = ksl[c][x];
      write(c, CFG_T1, a, k, (s + 1) % CH);
      write(c, CFG_T2, b, (t + CH - 1) % CH, (k + 2) % NS);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n) for (int c = 1; c < C; c++) if (tsc[c] !== tsc[0]) tsc_diff++;
    if (checking) begin
      for (int c = 0; c < C; c++) begin
        automatic int t = int'(tsc[c][TW-1:3]);
        automatic int bi = 3 - int'(tsc[c][2:1]);
        for (int b = 0; b < N; b++) begin
          automatic int x = src_of[c][b*CH + t];
          checks++;
          if (tx[c][b] !== data[c][x / CH][x % CH][bi]) begin
            failures++;
            if (failures < 10) $display("copy %0d tsc %0d line %0d slot %0d wrong", c, tsc[c], b, t);
          end
        end
      end
    end
  end

  initial begin
    for (int c = 0; c < C; c++) begin
      cfg_valid[c] = 1'b0; cfg_target[c] = CFG_T1; cfg_line[c] = '0;
      cfg_addr[c] = '0; cfg_data[c] = '0;
      for (int a = 0; a < N; a++) for (int s = 0; s < CH; s++) data[c][a][s] = 4'($urandom);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      setup_copy(0);
      setup_copy(1);
      setup_copy(2);
      setup_copy(3);
    join
    repeat (2 * 8 * CH) @(negedge clk);
    checking = 1;
    repeat (2 * 8 * CH) @(negedge clk);
    checking = 0;
    checks++;
    if (tsc_diff != 0) begin failures++; $display("slot counters differ"); end
    checks++;
    if (stalls == 0) begin failures++; $display("no handshake stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
