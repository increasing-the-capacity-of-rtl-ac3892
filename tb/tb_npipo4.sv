// Testbench for npipo4: random D0..D3 and EN against a register model.
module tb_npipo4;
  logic clk = 1'b0, en;
  logic [3:0] d, q, model;
  int checks = 0, failures = 0;

  npipo4 dut (.clk, .en, .d0(d[0]), .d1(d[1]), .d2(d[2]), .d3(d[3]),
              .q0(q[0]), .q1(q[1]), .q2(q[2]), .q3(q[3]));

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
