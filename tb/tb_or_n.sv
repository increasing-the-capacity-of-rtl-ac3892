// Testbench for or_n: or8 exhaustively, or16 on random and edge patterns.
module tb_or_n;
  logic [7:0] in8;
  logic [15:0] in16;
  logic out8, out16;
  int checks = 0, failures = 0;

  or_n #(.N(8))  dut8  (.in(in8),  .out(out8));
  or_n #(.N(16)) dut16 (.in(in16), .out(out16));

  initial begin
    for (int i = 0; i < 256; i++) begin
      in8 = 8'(i);
      in16 = (i < 16) ? (16'h1 << i) : ((i == 16) ? 16'h0 : 16'($urandom));
      #1;
      checks += 2;
      if (out8 !== (i != 0)) begin
        failures++;
        $display("or8 in=%h out=%b", in8, out8);
      end
      if (out16 !== (in16 != 16'h0)) begin
        failures++;
        $display("or16 in=%h out=%b", in16, out16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
