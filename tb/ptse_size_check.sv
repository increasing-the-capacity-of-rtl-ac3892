// Checker for one parallel_tse of size N, used by tb_parallel_tse_sizes.
//
// Writes a random mapping (multicast allowed) into the control RAM with one
// write per entry, feeds a random sample every clock and checks every
// outgoing sample and its slot number from the third frame on: outgoing
// slot n of frame g carries the incoming sample the control RAM names from
// frame g-1, on par_out when the slot counter is (n + log2(N) + 1) mod N.
// Runs FRAMES frames, then raises done.
module ptse_size_check #(
  parameter int unsigned N      = 32,
  parameter int unsigned FRAMES = 12
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int L = $clog2(N);
  logic rst_n = 1'b0;
  logic [3:0] par_in, par_out;
  logic frame_start, cfg_we;
  logic [L-1:0] out_slot, cfg_addr, cfg_data;
  int map [N];
  logic [3:0] hist [0:FRAMES][N];
  int t = -1;

  parallel_tse #(.N(N)) dut (.clk, .rst_n, .par_in, .frame_start, .par_out,
                             .out_slot, .cfg_we, .cfg_addr, .cfg_data);

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    cfg_we = 1'b0; cfg_addr = '0; cfg_data = '0; par_in = '0;
    for (int n = 0; n < int'(N); n++) begin
      @(negedge clk);
      map[n] = int'($urandom % N);
      cfg_we = 1'b1; cfg_addr = L'(n); cfg_data = L'(map[n]);
    end
    @(negedge clk);
    cfg_we = 1'b0;
    rst_n = 1'b1;
  end

  always @(negedge clk) begin
    if (rst_n && !done) begin
      if (t < 0 && frame_start) t = 0;
      else if (t >= 0) t++;
      if (t >= 0) begin
        automatic int f = t / int'(N), c = t % int'(N);
        automatic int n = (c - L - 1 + 4 * int'(N)) % int'(N);
        automatic int g = (t - L - 1) / int'(N);
        par_in = 4'($urandom);
        if (f <= int'(FRAMES)) hist[f][c] = par_in;
        if (g >= 2 && f <= int'(FRAMES)) begin
          checks++;
          if (out_slot !== L'(n) || par_out !== hist[g - 1][map[n]]) begin
            failures++;
            if (failures < 5)
              $display("Mux%0d t=%0d slot %0d: out=%h exp %h", N, t, n, par_out, hist[g - 1][map[n]]);
          end
        end
        if (f == int'(FRAMES) + 1) done = 1'b1;
      end
    end
  end
endmodule
