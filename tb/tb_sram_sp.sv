// Testbench for sram_sp: fills a 128 x 6 RAM, reads it back in a different
// order, and checks that DOUT holds its value while the RAM is idle or
// being written.
module tb_sram_sp;
  logic clk = 1'b0, me, nwe;
  logic [6:0] a;
  logic [5:0] di, dout, last;
  logic [5:0] model [128];
  int checks = 0, failures = 0;

  sram_sp #(.WORDS(128), .WIDTH(6)) dut (.clk, .me, .nwe, .a, .di, .dout);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    me = 1'b0; nwe = 1'b1; a = '0; di = '0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      me = 1'b1; nwe = 1'b0; a = 7'(i); di = 6'($urandom); model[i] = di;
    end
    for (int r = 0; r < 600; r++) begin
      @(negedge clk);
      case ($urandom % 3)
        0: begin  // read
          me = 1'b1; nwe = 1'b1; a = 7'($urandom);
          @(posedge clk); #1;
          checks++;
          if (dout !== model[a]) begin
            failures++;
            $display("read a=%0d got %h exp %h", a, dout, model[a]);
          end
        end
        1: begin  // write: output must hold
          last = dout;
          me = 1'b1; nwe = 1'b0; a = 7'($urandom); di = 6'($urandom); model[a] = di;
          @(posedge clk); #1;
          checks++;
          if (dout !== last) begin
            failures++;
            $display("dout changed on write");
          end
        end
        default: begin  // idle: output must hold
          last = dout;
          me = 1'b0; nwe = 1'($urandom); a = 7'($urandom);
          @(posedge clk); #1;
          checks++;
          if (dout !== last) begin
            failures++;
            $display("dout changed while idle");
          end
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
