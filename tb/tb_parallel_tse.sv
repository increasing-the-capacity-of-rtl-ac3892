// Testbench for parallel_tse at its default size (32 slots).
//
// A random mapping (not necessarily one-to-one, so one incoming slot can
// feed several outgoing ones) is written into the control RAM, then a
// random sample is fed in every clock. For every clock from the third frame
// on, par_out must be the incoming sample the control RAM names for the
// outgoing slot out_slot, taken from the previous frame, and out_slot must
// follow the stated latency of log2(N) + 1 clocks. Half-way, 8 entries are
// rewritten with one write each and checked after a frame.
module tb_parallel_tse;
  localparam int N = 32, L = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] par_in, par_out;
  logic frame_start, cfg_we;
  logic [L-1:0] out_slot, cfg_addr, cfg_data;
  int map [N];
  logic [3:0] hist [0:40][N];
  int t = -1;             // absolute clock, 0 at the first frame_start
  int checks = 0, failures = 0, rewrites = 0;
  bit check_en = 1;

  parallel_tse #(.N(N)) dut (.clk, .rst_n, .par_in, .frame_start, .par_out,
                             .out_slot, .cfg_we, .cfg_addr, .cfg_data);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_map(int n, int s);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = L'(n); cfg_data = L'(s); map[n] = s;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // drive and check at the negative edge
  always @(negedge clk) begin
    if (rst_n) begin
      if (t < 0 && frame_start) t = 0;
      else if (t >= 0) t++;
      if (t >= 0) begin
        automatic int f = t / N, c = t % N;
        automatic int n = (c - L - 1 + 2*N) % N;
        automatic int g = (t - L - 1) / N;  // output frame of slot n
        par_in = 4'($urandom);
        if (f <= 40) hist[f][c] = par_in;
        if (check_en && g >= 2 && f <= 40) begin
          checks++;
          if (out_slot !== L'(n) || par_out !== hist[g - 1][map[n]]) begin
            failures++;
            if (failures < 10)
              $display("t=%0d slot %0d (dut %0d): out=%h exp %h", t, n, out_slot, par_out, hist[g - 1][map[n]]);
          end
        end
        if (f == 41) begin
          checks++;
          if (rewrites == 0) begin failures++; $display("no rewrite done"); end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    cfg_we = 1'b0; cfg_addr = '0; cfg_data = '0; par_in = '0;
    for (int n = 0; n < N; n++) write_map(n, int'($urandom % N));
    @(negedge clk);
    rst_n = 1'b1;
    wait (t == 20 * N);
    check_en = 0;
    for (int r = 0; r < 8; r++) begin
      write_map(int'($urandom % N), int'($urandom % N));
      rewrites++;
    end
    wait (t == 23 * N);
    check_en = 1;
  end
endmodule
