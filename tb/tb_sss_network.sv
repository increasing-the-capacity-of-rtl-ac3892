// Testbench for sss_network (64 x 64, 128 slots).
//
// For every internal slot a random full permutation of the 64 lines is
// routed through the three stages (tb_route_pkg::clos_route) and the 32
// select words are written through the configuration port. Random bits are
// then driven on all inputs every clock and each output must equal the
// input the permutation of the current slot assigns to it, with no delay.
// Then the slot 5 route is replaced by a new permutation while running
// (connection rearrangement) and checked again.
module tb_sss_network;
  import tb_route_pkg::*;
  localparam int SLOTS = 128, SW = 7, TW = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [63:0] in, out;
  logic cfg_valid, cfg_ready;
  logic [1:0] cfg_stage;
  logic [3:0] cfg_elem;
  logic [SW-1:0] cfg_addr;
  logic [47:0] cfg_data;
  int perm [SLOTS][];
  int abs_clk = 0;
  int checks = 0, failures = 0, stalls = 0;
  bit checking = 0;

  logic [TW-1:0] tsc;
  assign tsc = TW'(abs_clk);

  sss_network dut (
    .clk, .tsc, .in, .out, .cfg_valid, .cfg_ready, .cfg_stage,
    .cfg_elem, .cfg_addr, .cfg_data
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) abs_clk <= abs_clk + 1;
  always @(posedge clk) in <= {$urandom, $urandom};

  initial begin
    #(10 * 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int stage, int elem, int slot, logic [47:0] data);
    @(negedge clk);
    cfg_valid = 1'b1; cfg_stage = 2'(stage); cfg_elem = 4'(elem);
    cfg_addr = SW'(slot); cfg_data = data;
    #1;   // sample cfg_ready before the edge that takes the request
    while (!cfg_ready) begin stalls++; @(negedge clk); #1; end
    @(posedge clk);
    #1 cfg_valid = 1'b0;
  endtask

  task automatic program_slot(int s);
    logic [31:0] s1 [8];
    logic [23:0] s2 [16];
    logic [47:0] s3 [8];
    if (!clos_route(perm[s], s1, s2, s3)) begin
      failures++; $display("routing failed for slot %0d", s);
    end
    for (int e = 0; e < 8; e++)  write(0, e, s, 48'(s1[e]));
    for (int e = 0; e < 16; e++) write(1, e, s, 48'(s2[e]));
    for (int e = 0; e < 8; e++)  write(2, e, s, s3[e]);
  endtask

  always @(negedge clk) begin
    if (checking) begin
      automatic int j = (abs_clk / 4) % SLOTS;
      automatic logic [63:0] e = '0;
      for (int x = 0; x < 64; x++) e[perm[j][x]] = in[x];
      checks++;
      if (out !== e) begin
        failures++;
        if (failures < 10) $display("clk %0d slot %0d out=%h exp=%h", abs_clk, j, out, e);
      end
    end
  end

  initial begin
    cfg_valid = 1'b0; cfg_stage = '0; cfg_elem = '0; cfg_addr = '0; cfg_data = '0;
    for (int s = 0; s < SLOTS; s++) shuffle(64, perm[s]);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < SLOTS; s++) program_slot(s);
    // wait for a whole frame so every slot has been read once
    repeat (4 * SLOTS) @(negedge clk);
    checking = 1;
    repeat (2 * 4 * SLOTS) @(negedge clk);
    // rearrange slot 5 while the network runs
    checking = 0;
    shuffle(64, perm[5]);
    program_slot(5);
    repeat (4 * SLOTS) @(negedge clk);
    checking = 1;
    repeat (4 * SLOTS) @(negedge clk);
    checks++;
    if (stalls == 0) begin failures++; $display("no handshake stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
