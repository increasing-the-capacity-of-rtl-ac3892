// Testbench running the TST network at the two capacities the report
// discusses: the prototype exchange's 256 half calls (4 lines of 64
// channels, the 64-channel first-stage time switch) and the proposed 4096
// half calls (16 lines of 256 channels). Each gets a random full
// permutation of all its channels, checked bit by bit for two frames.
module tb_tst_network_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   c [2], f [2], s [2];
  logic d [2];

  tst_size_check #(.N(4),  .CH(64))  u_proto (.clk, .checks(c[0]), .failures(f[0]), .stalls(s[0]), .done(d[0]));
  tst_size_check #(.N(16), .CH(256)) u_full  (.clk, .checks(c[1]), .failures(f[1]), .stalls(s[1]), .done(d[1]));

  int checks, failures;

  initial begin
    #(10 * 400000);
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    #1;
    wait (d[0] && d[1]);
    checks = 0; failures = 0;
    for (int i = 0; i < 2; i++) begin
      $display("%s: checks=%0d failures=%0d stalls=%0d", i == 0 ? "4 x 64 (256 half calls)" : "16 x 256 (4096 half calls)",
               c[i], f[i], s[i]);
      checks += c[i] + 1;
      failures += f[i];
      if (c[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
