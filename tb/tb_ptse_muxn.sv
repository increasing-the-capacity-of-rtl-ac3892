// Testbench for ptse_muxn at its default size (Mux32).
//
// Repeats the report's test sequence: shift a frame of 32 samples in
// (PIPO0_EN), copy it to the frame registers (PIPO1_EN), then run the
// output pipeline (PIPO2_EN) with a random permutation of positions on the
// SEL bus, skewed by the testbench (bit k presented k clocks late). Each
// outgoing sample must be the frame register the permutation names,
// log2(N) clocks after its SEL bit 0. Q must be the end of the shift chain.
module tb_ptse_muxn;
  localparam int N = 32, L = 5;
  logic clk = 1'b0, e0, e1, e2;
  logic [L-1:0] sel;
  logic [3:0] par_in, q, par_out;
  logic [3:0] frame [N];
  int perm [N];
  int checks = 0, failures = 0;

  ptse_muxn #(.N(N)) dut (.clk, .sel, .par_in, .pipo0_en(e0), .pipo1_en(e1),
                          .pipo2_en(e2), .q, .par_out);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e0 = 1'b0; e1 = 1'b0; e2 = 1'b0; sel = '0; par_in = '0;
    for (int f = 0; f < 6; f++) begin
      // shift in: sample i ends at position N-1-i
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        e0 = 1'b1; e1 = 1'b0; e2 = 1'b0;
        par_in = 4'($urandom);
        frame[N-1-i] = par_in;
      end
      @(negedge clk);
      e0 = 1'b0; e1 = 1'b1;
      checks++;
      if (q !== frame[N-1]) begin failures++; $display("Q=%h exp %h", q, frame[N-1]); end
      for (int n = 0; n < N; n++) perm[n] = int'($urandom % N);
      // output phase: cycle c carries bit k of output n = c - k
      for (int c = 0; c < N + L; c++) begin
        @(negedge clk);
        e1 = 1'b0; e2 = 1'b1;
        for (int k = 0; k < L; k++)
          sel[k] = (c - k >= 0 && c - k < N) ? perm[c - k][k] : 1'b0;
        if (c >= L) begin
          checks++;
          if (par_out !== frame[perm[c - L]]) begin
            failures++;
            $display("frame %0d out %0d: got %h exp %h (pos %0d)", f, c - L, par_out, frame[perm[c - L]], perm[c - L]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
