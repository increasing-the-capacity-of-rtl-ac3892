// Testbench running the parallel time switch element at every size the
// report tabulates: Mux2, Mux4, Mux8, Mux16, Mux32 (circuit size table) and
// Mux64 (chip area table), each with a random mapping, checked sample by
// sample with its latency of log2(N) + 1 clocks.
module tb_parallel_tse_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NS = 6;
  int   c [NS], f [NS];
  logic d [NS];

  ptse_size_check #(.N(2))  u_2  (.clk, .checks(c[0]), .failures(f[0]), .done(d[0]));
  ptse_size_check #(.N(4))  u_4  (.clk, .checks(c[1]), .failures(f[1]), .done(d[1]));
  ptse_size_check #(.N(8))  u_8  (.clk, .checks(c[2]), .failures(f[2]), .done(d[2]));
  ptse_size_check #(.N(16)) u_16 (.clk, .checks(c[3]), .failures(f[3]), .done(d[3]));
  ptse_size_check #(.N(32)) u_32 (.clk, .checks(c[4]), .failures(f[4]), .done(d[4]));
  ptse_size_check #(.N(64)) u_64 (.clk, .checks(c[5]), .failures(f[5]), .done(d[5]));

  int checks, failures;

  initial begin
    #(10 * 20000);
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    #1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
    checks = 0; failures = 0;
    for (int i = 0; i < NS; i++) begin
      $display("Mux%0d: checks=%0d failures=%0d", 2 << i, c[i], f[i]);
      checks += c[i] + 1;
      failures += f[i];
      if (c[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
