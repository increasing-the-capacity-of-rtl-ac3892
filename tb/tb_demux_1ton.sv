// Testbench for demux_1ton: demux16 and demux8, every select and input
// value; the output must be one-hot (or zero) at the selected position.
module tb_demux_1ton;
  logic a16, a8;
  logic [3:0] s16;
  logic [2:0] s8;
  logic [15:0] y16;
  logic [7:0] y8;
  int checks = 0, failures = 0;

  demux_1ton #(.N(16)) dut16 (.a(a16), .s(s16), .y(y16));
  demux_1ton #(.N(8))  dut8  (.a(a8),  .s(s8),  .y(y8));

  initial begin
    for (int i = 0; i < 32; i++) begin
      {a16, s16} = 5'(i);
      {a8, s8} = 4'(i);
      #1;
      checks += 2;
      if (y16 !== (16'(a16) << s16)) begin
        failures++;
        $display("demux16 a=%b s=%0d y=%h", a16, s16, y16);
      end
      if (y8 !== (8'(a8) << s8)) begin
        failures++;
        $display("demux8 a=%b s=%0d y=%h", a8, s8, y8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
