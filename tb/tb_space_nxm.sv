// Testbench for space_nxm in the three sizes of the SSS network (8x16,
// 8x8, 16x8): random inputs and select words, outputs compared with the OR
// of the inputs routed to each output.
module tb_space_nxm;
  logic [7:0]  a_in, b_in;
  logic [15:0] c_in;
  logic [31:0] a_sel;
  logic [23:0] b_sel;
  logic [47:0] c_sel;
  logic [15:0] a_out;
  logic [7:0]  b_out, c_out;
  int checks = 0, failures = 0;

  space_nxm #(.N_IN(8),  .N_OUT(16)) dut_a (.in(a_in), .sel(a_sel), .out(a_out));
  space_nxm #(.N_IN(8),  .N_OUT(8))  dut_b (.in(b_in), .sel(b_sel), .out(b_out));
  space_nxm #(.N_IN(16), .N_OUT(8))  dut_c (.in(c_in), .sel(c_sel), .out(c_out));

  initial begin
    for (int t = 0; t < 2000; t++) begin
      automatic logic [15:0] ea = '0;
      automatic logic [7:0]  eb = '0, ec = '0;
      a_in = 8'($urandom); b_in = 8'($urandom); c_in = 16'($urandom);
      a_sel = $urandom; b_sel = 24'($urandom); c_sel = {16'($urandom), 32'($urandom)};
      #1;
      for (int i = 0; i < 8; i++)  ea[a_sel[4*i +: 4]] |= a_in[i];
      for (int i = 0; i < 8; i++)  eb[b_sel[3*i +: 3]] |= b_in[i];
      for (int i = 0; i < 16; i++) ec[c_sel[3*i +: 3]] |= c_in[i];
      checks += 3;
      if (a_out !== ea) begin failures++; $display("8x16 out=%h exp=%h", a_out, ea); end
      if (b_out !== eb) begin failures++; $display("8x8 out=%h exp=%h", b_out, eb); end
      if (c_out !== ec) begin failures++; $display("16x8 out=%h exp=%h", c_out, ec); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
