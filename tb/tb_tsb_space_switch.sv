// Testbench for tsb_space_switch (4 x 4, 128 slots).
//
// Random control RAM contents (not one-to-one, so some outputs are idle and
// some are loaded twice in a slot), random incoming words every slot. Each
// output word during slot j+1 must be the word of the last bus turn of
// slot j that the control RAM sent to it, or 0 if none did. Four bus turns
// per slot are checked by the cycle count of the result.
module tb_tsb_space_switch;
  import tse_pkg::*;
  localparam int N = 4, SLOTS = 128, TW = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [TW-1:0] tsc;
  sym_t in_word [N];
  sym_t out_word [N];
  logic cfg_valid;
  logic [6:0] cfg_slot;
  logic [1:0] cfg_turn, cfg_data;
  int cram [SLOTS][N];
  sym_t prev_in [N];
  int checks = 0, failures = 0, idle = 0, double = 0;

  tsb_space_switch dut (.clk, .rst_n, .tsc, .in_word, .out_word, .cfg_valid,
                        .cfg_slot, .cfg_turn, .cfg_data);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) tsc <= tsc + 1'b1;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tsc = '0; cfg_valid = 1'b0; cfg_slot = '0; cfg_turn = '0; cfg_data = '0;
    for (int i = 0; i < N; i++) in_word[i] = '0;
    for (int s = 0; s < SLOTS; s++)
      for (int k = 0; k < N; k++) begin
        cram[s][k] = int'($urandom % N);
        @(negedge clk);
        cfg_valid = 1'b1; cfg_slot = 7'(s); cfg_turn = 2'(k); cfg_data = 2'(cram[s][k]);
      end
    @(negedge clk);
    cfg_valid = 1'b0;
    rst_n = 1'b1;
    for (int j = 0; j < 3 * SLOTS; j++) begin
      // tsc is at turn 0 of slot j here (negedge after the slot started)
      for (int i = 0; i < N; i++) in_word[i] = sym_t'($urandom);
      if (j > 0) begin
        automatic int ps = (j - 1) % SLOTS;
        for (int o = 0; o < N; o++) begin
          automatic sym_t e = '0;
          automatic int hits = 0;
          for (int k = 0; k < N; k++) if (cram[ps][k] == o) begin e = prev_in[k]; hits++; end
          if (hits == 0) idle++;
          if (hits > 1) double++;
          checks++;
          if (out_word[o] !== e) begin
            failures++;
            if (failures < 10) $display("slot %0d out %0d: got %h exp %h", ps, o, out_word[o], e);
          end
        end
      end
      prev_in = in_word;
      repeat (N) @(negedge clk);
    end
    checks++;
    if (idle == 0 || double == 0) begin failures++; $display("idle or doubly loaded output never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
