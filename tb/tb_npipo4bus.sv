// Testbench for npipo4bus: random 4-bit D and EN against a register model.
module tb_npipo4bus;
  logic clk = 1'b0, en;
  logic [3:0] d, q, model;
  int checks = 0, failures = 0;

  npipo4bus dut (.clk, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1; d = 4'h0;
    @(posedge clk); #1;
    model = 4'h0;
    for (int i = 0; i < 400; i++) begin
      en = 1'($urandom); d = 4'($urandom);
      @(posedge clk); #1;
      if (en) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("mismatch cycle %0d: en=%b d=%h q=%h exp=%h", i, en, d, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
