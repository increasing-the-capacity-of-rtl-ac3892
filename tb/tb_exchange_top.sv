// End-to-end testbench for exchange_top, every parameter at its default.
//
// The four switching designs of the top run side by side, each driven and
// checked by its own process:
//   TST    central network, 4 x (16 x 256): a random full permutation of all
//          4096 half calls is set up in all four networks through their
//          four connection memory ports in parallel, with different symbols
//          in each network; every bit of every outgoing channel of every
//          network is checked for two frames, then 64 half calls are
//          re-routed on the running networks and checked again.
//   TSSST  64 x 64: a random full permutation, each slot's line mapping
//          routed through the SSS 8-16-8 stages, checked for two frames.
//   PTSE   32 slots: a random (also multicast) mapping with one write per
//          entry, every outgoing sample checked with its latency, then part
//          of the mapping is rewritten while the element runs.
//   TSB    4 x 4: random bus turn assignments, every output word checked,
//          idle outputs (0) and outputs loaded twice (last turn wins).
// Each mechanism is counted; one that never happened is a failure:
// handshake stalls on the connection memory ports, connections that wrap
// round the frame in the first and in the second time stage, re-routing,
// SSS routing through the middle elements, PTSE frame loads, multicast and live
// rewrites, TSB bus turns, idle and doubly loaded outputs.
module tb_exchange_top;
  import tse_pkg::*;
  import tb_route_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ---------------- DUT ports ----------------
  logic [15:0] tst_rx [4], tst_tx [4];
  logic [10:0] tst_tsc [4];
  logic tst_frame_start [4], tst_cfg_valid [4], tst_cfg_ready [4];
  cfg_target_e tst_cfg_target [4];
  logic [3:0] tst_cfg_line [4];
  logic [8:0] tst_cfg_addr [4], tst_cfg_data [4];

  logic [63:0] tssst_rx, tssst_tx;
  logic [8:0] tssst_tsc;
  logic tssst_frame_start, tssst_cfg_valid, tssst_cfg_ready;
  cfg_target_e tssst_cfg_target;
  logic [5:0] tssst_cfg_line;
  logic [1:0] tssst_cfg_stage;
  logic [6:0] tssst_cfg_addr;
  logic [47:0] tssst_cfg_data;

  logic [3:0] ptse_par_in, ptse_par_out;
  logic ptse_frame_start, ptse_cfg_we;
  logic [4:0] ptse_out_slot, ptse_cfg_addr, ptse_cfg_data;

  sym_t tsb_in_word [4];
  sym_t tsb_out_word [4];
  logic [8:0] tsb_tsc;
  logic tsb_frame_start, tsb_cfg_valid;
  logic [6:0] tsb_cfg_slot;
  logic [1:0] tsb_cfg_turn, tsb_cfg_data;

  exchange_top dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #(10 * 3000000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ================= TST 16 x 256 =================
  localparam int TC = 4, TN = 16, TCH = 256, TNS = 2 * TCH;
  logic [3:0] t_data [TC][TN][TCH];
  int t_dst [], t_src [], t_k [], t_smap [];
  int tst_stalls = 0, tst_wrap1 = 0, tst_wrap2 = 0, tst_reroutes = 0;
  bit t_check = 0, tst_done = 0;

  for (genvar c = 0; c < TC; c++) begin : g_tc
    for (genvar a = 0; a < TN; a++) begin : g_trx
      assign tst_rx[c][a] = t_data[c][a][tst_tsc[c][10:3]][3 - tst_tsc[c][2:1]];
    end
  end

  task automatic tst_write(int c, cfg_target_e tg, int line, int addr, int d);
    @(negedge clk);
    tst_cfg_valid[c] = 1'b1; tst_cfg_target[c] = tg; tst_cfg_line[c] = 4'(line);
    tst_cfg_addr[c] = 9'(addr); tst_cfg_data[c] = 9'(d);
    #1;
    while (!tst_cfg_ready[c]) begin tst_stalls++; @(negedge clk); #1; end
    @(posedge clk);
    #1 tst_cfg_valid[c] = 1'b0;
  endtask

  // the same connections go into all four networks, written in parallel
  task automatic tst_load_copy(int c);
    for (int k = 0; k < TNS; k++) for (int a = 0; a < TN; a++) tst_write(c, CFG_S, a, k, t_smap[k*TN + a]);
    for (int x = 0; x < TN*TCH; x++) begin
      automatic int a = x / TCH, s = x % TCH, b = t_dst[x] / TCH, t = t_dst[x] % TCH, k = t_k[x];
      tst_write(c, CFG_T1, a, k, (s + 1) % TCH);
      tst_write(c, CFG_T2, b, (t + TCH - 1) % TCH, (k + 2) % TNS);
    end
  endtask

  task automatic tst_route_and_load();
    int sl [] = new[TN*TCH];
    int dl [] = new[TN*TCH];
    for (int c = 0; c < TN*TCH; c++) begin
      t_src[t_dst[c]] = c; sl[c] = c / TCH; dl[c] = t_dst[c] / TCH;
    end
    if (!assign_slots(TN, TNS, sl, dl, t_k)) begin failures++; $display("TST slot assignment failed"); end
    t_smap = new[TNS*TN];
    foreach (t_smap[i]) t_smap[i] = -1;
    for (int c = 0; c < TN*TCH; c++) t_smap[((t_k[c] + 1) % TNS)*TN + sl[c]] = dl[c];
    complete_maps(TN, TNS, t_smap);
    for (int c = 0; c < TN*TCH; c++) begin
      automatic int s = c % TCH, t = t_dst[c] % TCH, k = t_k[c];
      // the word is stored one external slot late and leaves one internal
      // slot after it is read: count the ones that cross a frame boundary
      if (k < 2 * (s + 1)) tst_wrap1++;
      if ((k + 2) % TNS >= 2 * ((t + TCH - 1) % TCH)) tst_wrap2++;
    end
    fork
      tst_load_copy(0);
      tst_load_copy(1);
      tst_load_copy(2);
      tst_load_copy(3);
    join
  endtask

  always @(negedge clk) begin
    if (t_check) begin
      for (int n = 0; n < TC; n++) begin
        automatic int t = int'(tst_tsc[n][10:3]);
        automatic int bi = 3 - int'(tst_tsc[n][2:1]);
        for (int b = 0; b < TN; b++) begin
          automatic int c = t_src[b*TCH + t];
          checks++;
          if (tst_tx[n][b] !== t_data[n][c / TCH][c % TCH][bi]) begin
            failures++;
            if (failures < 10) $display("TST copy %0d tsc %0d line %0d slot %0d wrong", n, tst_tsc[n], b, t);
          end
        end
      end
    end
  end

  task automatic run_tst();
    for (int n = 0; n < TC; n++)
      for (int a = 0; a < TN; a++) for (int s = 0; s < TCH; s++) t_data[n][a][s] = 4'($urandom);
    shuffle(TN*TCH, t_dst);
    t_src = new[TN*TCH];
    tst_route_and_load();
    repeat (2 * 8 * TCH) @(negedge clk);
    t_check = 1;
    repeat (2 * 8 * TCH) @(negedge clk);
    t_check = 0;
    for (int r = 0; r < 32; r++) begin
      automatic int x = int'($urandom % (TN*TCH)), y = int'($urandom % (TN*TCH)), tmp;
      tmp = t_dst[x]; t_dst[x] = t_dst[y]; t_dst[y] = tmp;
      if (x != y) tst_reroutes += 2;
    end
    tst_route_and_load();
    repeat (2 * 8 * TCH) @(negedge clk);
    t_check = 1;
    repeat (8 * TCH) @(negedge clk);
    t_check = 0;
    tst_done = 1;
  endtask

  // ================= TSSST 64 x 64 =================
  localparam int SN = 64, SCH = 64, SNS = 2 * SCH;
  logic [3:0] s_data [SN][SCH];
  int s_dst [], s_src [], s_k [], s_smap [];
  int tssst_stalls = 0, sss_routed = 0;
  bit [15:0] mid_used = '0;
  bit s_check = 0, tssst_done = 0;

  for (genvar a = 0; a < SN; a++) begin : g_srx
    assign tssst_rx[a] = s_data[a][tssst_tsc[8:3]][3 - tssst_tsc[2:1]];
  end

  task automatic tssst_write(cfg_target_e tg, int stage, int line, int addr, logic [47:0] d);
    @(negedge clk);
    tssst_cfg_valid = 1'b1; tssst_cfg_target = tg; tssst_cfg_stage = 2'(stage);
    tssst_cfg_line = 6'(line); tssst_cfg_addr = 7'(addr); tssst_cfg_data = d;
    #1;
    while (!tssst_cfg_ready) begin tssst_stalls++; @(negedge clk); #1; end
    @(posedge clk);
    #1 tssst_cfg_valid = 1'b0;
  endtask

  always @(negedge clk) begin
    if (s_check) begin
      automatic int t = int'(tssst_tsc[8:3]);
      automatic int bi = 3 - int'(tssst_tsc[2:1]);
      for (int b = 0; b < SN; b++) begin
        automatic int c = s_src[b*SCH + t];
        checks++;
        if (tssst_tx[b] !== s_data[c / SCH][c % SCH][bi]) begin
          failures++;
          if (failures < 10) $display("TSSST tsc %0d line %0d slot %0d wrong", tssst_tsc, b, t);
        end
      end
    end
  end

  task automatic run_tssst();
    int sl [] = new[SN*SCH];
    int dl [] = new[SN*SCH];
    for (int a = 0; a < SN; a++) for (int s = 0; s < SCH; s++) s_data[a][s] = 4'($urandom);
    shuffle(SN*SCH, s_dst);
    s_src = new[SN*SCH];
    for (int c = 0; c < SN*SCH; c++) begin
      s_src[s_dst[c]] = c; sl[c] = c / SCH; dl[c] = s_dst[c] / SCH;
    end
    if (!assign_slots(SN, SNS, sl, dl, s_k)) begin failures++; $display("TSSST slot assignment failed"); end
    s_smap = new[SNS*SN];
    foreach (s_smap[i]) s_smap[i] = -1;
    for (int c = 0; c < SN*SCH; c++) s_smap[((s_k[c] + 1) % SNS)*SN + sl[c]] = dl[c];
    complete_maps(SN, SNS, s_smap);
    for (int k = 0; k < SNS; k++) begin
      automatic int p [] = new[SN];
      automatic logic [31:0] s1 [8];
      automatic logic [23:0] s2 [16];
      automatic logic [47:0] s3 [8];
      for (int a = 0; a < SN; a++) p[a] = s_smap[k*SN + a];
      if (!clos_route(p, s1, s2, s3)) begin failures++; $display("SSS routing failed"); end
      else sss_routed++;
      // first-stage element e sends input i to middle element s1[e][4i +: 4]
      for (int e = 0; e < 8; e++) for (int i = 0; i < 8; i++) mid_used[s1[e][4*i +: 4]] = 1'b1;
      for (int e = 0; e < 8; e++)  tssst_write(CFG_S, 0, e, k, 48'(s1[e]));
      for (int e = 0; e < 16; e++) tssst_write(CFG_S, 1, e, k, 48'(s2[e]));
      for (int e = 0; e < 8; e++)  tssst_write(CFG_S, 2, e, k, s3[e]);
    end
    for (int c = 0; c < SN*SCH; c++) begin
      automatic int a = c / SCH, s = c % SCH, b = s_dst[c] / SCH, t = s_dst[c] % SCH, k = s_k[c];
      tssst_write(CFG_T1, 0, a, k, 48'(unsigned'((s + 1) % SCH)));
      tssst_write(CFG_T2, 0, b, (t + SCH - 1) % SCH, 48'(unsigned'((k + 2) % SNS)));
    end
    repeat (2 * 8 * SCH) @(negedge clk);
    s_check = 1;
    repeat (2 * 8 * SCH) @(negedge clk);
    s_check = 0;
    tssst_done = 1;
  endtask

  // ================= parallel TSE, 32 slots =================
  localparam int PN = 32, PL = 5, PFRAMES = 40;
  int p_map [PN];
  logic [3:0] p_hist [0:PFRAMES][PN];
  int p_t = -1, p_frames = 0, p_multicast = 0, p_rewrites = 0;
  bit p_check = 1, ptse_done = 0;

  task automatic ptse_write(int n, int s);
    @(negedge clk);
    ptse_cfg_we = 1'b1; ptse_cfg_addr = 5'(n); ptse_cfg_data = 5'(s); p_map[n] = s;
    @(negedge clk);
    ptse_cfg_we = 1'b0;
  endtask

  always @(negedge clk) begin
    if (rst_n && !ptse_done) begin
      if (ptse_frame_start) p_frames++;
      if (p_t < 0 && ptse_frame_start) p_t = 0;
      else if (p_t >= 0) p_t++;
      if (p_t >= 0) begin
        automatic int f = p_t / PN, c = p_t % PN;
        automatic int n = (c - PL - 1 + 2*PN) % PN;
        automatic int g = (p_t - PL - 1) / PN;
        ptse_par_in = 4'($urandom);
        if (f <= PFRAMES) p_hist[f][c] = ptse_par_in;
        if (p_check && g >= 2 && f <= PFRAMES) begin
          checks++;
          if (ptse_out_slot !== 5'(n) || ptse_par_out !== p_hist[g - 1][p_map[n]]) begin
            failures++;
            if (failures < 10) $display("PTSE t=%0d slot %0d wrong", p_t, n);
          end
        end
        if (f == PFRAMES + 1) ptse_done = 1;
      end
    end
  end

  task automatic run_ptse();
    for (int n = 0; n < PN; n++) ptse_write(n, int'($urandom % PN));
    for (int s = 0; s < PN; s++) begin
      automatic int uses = 0;
      for (int n = 0; n < PN; n++) if (p_map[n] == s) uses++;
      if (uses > 1) p_multicast++;
    end
    wait (p_t == 20 * PN);
    p_check = 0;
    for (int r = 0; r < 8; r++) begin
      ptse_write(int'($urandom % PN), int'($urandom % PN));
      p_rewrites++;
    end
    wait (p_t == 23 * PN);
    p_check = 1;
    wait (ptse_done);
  endtask

  // ================= TSB 4 x 4 =================
  localparam int BN = 4, BSLOTS = 128;
  int b_cram [BSLOTS][BN];
  sym_t b_prev [BN];
  int b_turns = 0, b_idle = 0, b_double = 0, b_slots = 0;
  bit b_run = 0, tsb_done = 0;

  // new words at the first turn of every slot; check the previous slot
  always @(negedge clk) begin
    if (b_run) begin
      b_turns++;
      if (tsb_tsc[1:0] == 2'd0) begin
        automatic int j = int'(tsb_tsc[8:2]);
        automatic int ps = (j + BSLOTS - 1) % BSLOTS;
        if (b_slots > 0) begin
          for (int o = 0; o < BN; o++) begin
            automatic sym_t e = '0;
            automatic int hits = 0;
            for (int k = 0; k < BN; k++) if (b_cram[ps][k] == o) begin e = b_prev[k]; hits++; end
            if (hits == 0) b_idle++;
            if (hits > 1) b_double++;
            checks++;
            if (tsb_out_word[o] !== e) begin
              failures++;
              if (failures < 10) $display("TSB slot %0d out %0d: got %h exp %h", ps, o, tsb_out_word[o], e);
            end
          end
        end
        for (int i = 0; i < BN; i++) tsb_in_word[i] = sym_t'($urandom);
        b_prev = tsb_in_word;
        b_slots++;
        if (b_slots > 3 * BSLOTS) tsb_done = 1;
      end
    end
  end

  task automatic run_tsb();
    for (int s = 0; s < BSLOTS; s++)
      for (int k = 0; k < BN; k++) begin
        b_cram[s][k] = int'($urandom % BN);
        @(negedge clk);
        tsb_cfg_valid = 1'b1; tsb_cfg_slot = 7'(s); tsb_cfg_turn = 2'(k);
        tsb_cfg_data = 2'(b_cram[s][k]);
      end
    @(negedge clk);
    tsb_cfg_valid = 1'b0;
    // start at a slot boundary
    while (tsb_tsc[1:0] != 2'd3) @(negedge clk);
    b_run = 1;
    wait (tsb_done);
    b_run = 0;
  endtask

  // ================= main =================
  task automatic expect_seen(string what, int n);
    checks++;
    $display("%-40s %0d", what, n);
    if (n == 0) begin failures++; $display("  never happened: %s", what); end
  endtask

  initial begin
    for (int n = 0; n < TC; n++) begin
      tst_cfg_valid[n] = 1'b0; tst_cfg_target[n] = CFG_T1; tst_cfg_line[n] = '0;
      tst_cfg_addr[n] = '0; tst_cfg_data[n] = '0;
    end
    tssst_cfg_valid = 1'b0; tssst_cfg_target = CFG_T1; tssst_cfg_stage = '0;
    tssst_cfg_line = '0; tssst_cfg_addr = '0; tssst_cfg_data = '0;
    ptse_par_in = '0; ptse_cfg_we = 1'b0; ptse_cfg_addr = '0; ptse_cfg_data = '0;
    for (int i = 0; i < BN; i++) tsb_in_word[i] = '0;
    tsb_cfg_valid = 1'b0; tsb_cfg_slot = '0; tsb_cfg_turn = '0; tsb_cfg_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      run_tst();
      run_tssst();
      run_ptse();
      run_tsb();
    join
    expect_seen("TST connection memory stalls", tst_stalls);
    expect_seen("TST half calls wrapping in first stage", tst_wrap1);
    expect_seen("TST half calls wrapping in last stage", tst_wrap2);
    expect_seen("TST half calls re-routed", tst_reroutes);
    expect_seen("TSSST connection memory stalls", tssst_stalls);
    expect_seen("SSS slots routed through 3 stages", sss_routed);
    expect_seen("SSS middle elements used", $countones(mid_used));
    expect_seen("PTSE frames loaded", p_frames);
    expect_seen("PTSE incoming slots sent to several", p_multicast);
    expect_seen("PTSE live rewrites", p_rewrites);
    expect_seen("TSB bus turns", b_turns);
    expect_seen("TSB idle outputs", b_idle);
    expect_seen("TSB outputs loaded twice", b_double);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
