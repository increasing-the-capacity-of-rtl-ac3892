// Testbench for tsc_counter: counts after reset, stops with en low, wraps
// at the end of the frame and flags frame_start at count 0.
module tb_tsc_counter;
  logic clk = 1'b0, rst_n, en, fs;
  logic [5:0] tsc;
  int exp_cnt, starts = 0;
  int checks = 0, failures = 0;

  tsc_counter #(.W(6)) dut (.clk, .rst_n, .en, .tsc, .frame_start(fs));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b1;
    #12 rst_n = 1'b1;
    exp_cnt = 1;   // one enabled edge (t=15) before the first check
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      checks++;
      if (tsc !== 6'(exp_cnt) || fs !== (exp_cnt == 0)) begin
        failures++;
        $display("cycle %0d tsc=%0d exp=%0d fs=%b", i, tsc, exp_cnt, fs);
      end
      if (fs) starts++;
      en = ($urandom % 5) != 0;
      if (en) exp_cnt = (exp_cnt + 1) % 64;
    end
    checks++;
    if (starts < 3) begin
      failures++;
      $display("frame wrap seen only %0d times", starts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
