// Testbench for space_switch at its default size (16 x 16, 512 slots).
//
// Every connection memory entry gets a random outgoing line (the mapping of
// a slot need not be one-to-one here, so the OR merging is exercised too).
// Random bits are driven on all inputs every clock, and every output bit is
// compared with the OR of the inputs that the memories route to it in the
// current internal slot; the space stage adds no delay.
module tb_space_switch;
  localparam int N = 16, SLOTS = 512;
  localparam int LW = 4, SW = 9, TW = SW + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] in, out;
  logic cfg_valid, cfg_ready;
  logic [LW-1:0] cfg_line, cfg_data;
  logic [SW-1:0] cfg_addr;
  logic [LW-1:0] cram [N][SLOTS];
  int abs_clk = 0;
  int checks = 0, failures = 0, merges = 0, stalls = 0;
  int check_from;

  logic [TW-1:0] tsc;
  assign tsc = TW'(abs_clk);

  space_switch #(.N(N), .SLOTS(SLOTS)) dut (
    .clk, .tsc, .in, .out, .cfg_valid, .cfg_ready, .cfg_line,
    .cfg_addr, .cfg_data
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) abs_clk <= abs_clk + 1;
  always @(posedge clk) in <= N'($urandom);

  initial begin
    #(10 * 4 * SLOTS * (N + 4));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < SLOTS; j++) cram[i][j] = LW'($urandom);
    cfg_valid = 1'b0; cfg_line = '0; cfg_addr = '0; cfg_data = '0;
    check_from = 1 << 30;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < SLOTS; j++) begin
        @(negedge clk);
        cfg_valid = 1'b1; cfg_line = LW'(i); cfg_addr = SW'(j); cfg_data = cram[i][j];
        #1;   // sample cfg_ready before the edge that takes the request
        while (!cfg_ready) begin stalls++; @(negedge clk); #1; end
        @(posedge clk);
        #1 cfg_valid = 1'b0;
      end
    check_from = (abs_clk / 4 + SLOTS + 1) * 4;
  end

  always @(negedge clk) begin
    if (rst_n && abs_clk >= check_from) begin
      automatic int j = (abs_clk / 4) % SLOTS;
      automatic logic [N-1:0] exp_out = '0;
      automatic int hits [N] = '{default: 0};
      for (int i = 0; i < N; i++) begin
        exp_out[cram[i][j]] |= in[i];
        hits[cram[i][j]]++;
      end
      for (int o = 0; o < N; o++) if (hits[o] > 1 && (abs_clk % 4) == 0) merges++;
      checks++;
      if (out !== exp_out) begin
        failures++;
        if (failures < 10) $display("clk %0d slot %0d: out=%h exp=%h", abs_clk, j, out, exp_out);
      end
      if (abs_clk >= check_from + 2 * 4 * SLOTS) begin
        checks++;
        if (merges == 0 || stalls == 0) begin failures++; $display("merge or stall never seen"); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
