// Testbench for mux21x4bus: every combination of S, A and B.
module tb_mux21x4bus;
  logic s;
  logic [3:0] a, b, y;
  int checks = 0, failures = 0;

  mux21x4bus dut (.s, .a, .b, .y);

  initial begin
    for (int i = 0; i < 512; i++) begin
      {s, a, b} = 9'(i);
      #1;
      checks++;
      if (y !== (s ? b : a)) begin
        failures++;
        $display("mismatch s=%b a=%h b=%h y=%h", s, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
