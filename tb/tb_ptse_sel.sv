// Testbench for ptse_sel (L = 5): random words with random enable; bit k of
// the output must equal bit k of the input word k enabled steps earlier.
module tb_ptse_sel;
  localparam int L = 5;
  logic clk = 1'b0, en;
  logic [L-1:0] sel_in, sel_out;
  logic [L-1:0] hist [$];   // input words at the enabled edges, newest last
  int checks = 0, failures = 0;

  ptse_sel #(.L(L)) dut (.clk, .en, .sel_in, .sel_out);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      en = (i < 10) ? 1'b1 : 1'($urandom);
      sel_in = L'($urandom);
      #1;
      if (hist.size() >= L) begin
        for (int k = 0; k < L; k++) begin
          automatic logic e = (k == 0) ? sel_in[0] : hist[hist.size() - k][k];
          checks++;
          if (sel_out[k] !== e) begin
            failures++;
            $display("step %0d bit %0d: got %b exp %b", i, k, sel_out[k], e);
          end
        end
      end
      @(posedge clk);
      if (en) hist.push_back(sel_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
