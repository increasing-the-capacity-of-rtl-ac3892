// Testbench for nfbff: random D and EN; Q must follow D only on enabled
// clock edges and NQ must always be its inverse.
module tb_nfbff;
  logic clk = 1'b0, en, d, q, nq, model;
  int checks = 0, failures = 0;

  nfbff dut (.clk, .en, .d, .q, .nq);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1; d = 1'b0;
    @(posedge clk); #1;
    model = 1'b0;
    for (int i = 0; i < 400; i++) begin
      en = 1'($urandom); d = 1'($urandom);
      @(posedge clk); #1;
      if (en) model = d;
      checks++;
      if (q !== model || nq !== ~model) begin
        failures++;
        $display("mismatch cycle %0d: en=%b d=%b q=%b nq=%b exp=%b", i, en, d, q, nq, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
