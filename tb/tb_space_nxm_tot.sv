// Testbench for space_nxm_tot (default space8x16tot, and space16x8tot):
// writes a random select word for each of the 128 slots through ME/NWE/A/DI,
// then reads the RAM slot by slot and checks that the element switches
// with the word just read, and keeps it while the RAM is written.
module tb_space_nxm_tot;
  logic clk = 1'b0;
  logic me, nwe;
  logic [6:0] a;
  logic [31:0] a_di;
  logic [47:0] c_di;
  logic [7:0]  a_in;
  logic [15:0] c_in;
  logic [15:0] a_out;
  logic [7:0]  c_out;
  logic [31:0] a_mem [128];
  logic [47:0] c_mem [128];
  int checks = 0, failures = 0;

  space_nxm_tot dut_a (.clk, .me, .nwe, .a, .di(a_di), .in(a_in), .out(a_out));
  space_nxm_tot #(.N_IN(16), .N_OUT(8), .WORDS(128)) dut_c (
    .clk, .me, .nwe, .a, .di(c_di), .in(c_in), .out(c_out));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(int slot);
    logic [15:0] ea = '0;
    logic [7:0]  ec = '0;
    for (int i = 0; i < 8; i++)  ea[a_mem[slot][4*i +: 4]] |= a_in[i];
    for (int i = 0; i < 16; i++) ec[c_mem[slot][3*i +: 3]] |= c_in[i];
    checks += 2;
    if (a_out !== ea) begin failures++; $display("8x16 slot %0d out=%h exp=%h", slot, a_out, ea); end
    if (c_out !== ec) begin failures++; $display("16x8 slot %0d out=%h exp=%h", slot, c_out, ec); end
  endtask

  initial begin
    me = 1'b0; nwe = 1'b1; a = '0; a_di = '0; c_di = '0; a_in = '0; c_in = '0;
    for (int s = 0; s < 128; s++) begin
      a_mem[s] = $urandom; c_mem[s] = {16'($urandom), 32'($urandom)};
      @(negedge clk);
      me = 1'b1; nwe = 1'b0; a = 7'(s); a_di = a_mem[s]; c_di = c_mem[s];
    end
    for (int s = 0; s < 128; s++) begin
      @(negedge clk);
      me = 1'b1; nwe = 1'b1; a = 7'(s);
      @(negedge clk);
      me = 1'b0;
      repeat (2) begin
        a_in = 8'($urandom); c_in = 16'($urandom);
        #1 check_out(s);
        @(negedge clk);
      end
      // a write to another slot must not disturb the select word in use
      me = 1'b1; nwe = 1'b0; a = 7'(s + 1); a_di = a_mem[(s + 1) % 128]; c_di = c_mem[(s + 1) % 128];
      @(negedge clk);
      me = 1'b0;
      a_in = 8'($urandom); c_in = 16'($urandom);
      #1 check_out(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
