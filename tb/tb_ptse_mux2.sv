// Testbench for ptse_mux2: random enables, select and input samples against
// a behavioural model of the two shift registers, two frame registers and
// the output register.
module tb_ptse_mux2;
  logic clk = 1'b0, sel, e0, e1, e2;
  logic [3:0] par_in, q, par_out;
  logic [3:0] m_sh0, m_sh1, m_fr0, m_fr1, m_out;
  int checks = 0, failures = 0;

  ptse_mux2 dut (.clk, .sel, .par_in, .pipo0_en(e0), .pipo1_en(e1), .pipo2_en(e2),
                 .q, .par_out);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // flush: load every register once
    sel = 1'b0; e0 = 1'b1; e1 = 1'b1; e2 = 1'b1; par_in = 4'h0;
    repeat (3) @(posedge clk);
    #1;
    m_sh0 = 4'h0; m_sh1 = 4'h0; m_fr0 = 4'h0; m_fr1 = 4'h0; m_out = 4'h0;
    for (int i = 0; i < 500; i++) begin
      sel = 1'($urandom); e0 = 1'($urandom); e1 = 1'($urandom); e2 = 1'($urandom);
      par_in = 4'($urandom);
      @(posedge clk); #1;
      begin
        automatic logic [3:0] n_out = e2 ? (sel ? m_fr1 : m_fr0) : m_out;
        automatic logic [3:0] n_fr0 = e1 ? m_sh0 : m_fr0;
        automatic logic [3:0] n_fr1 = e1 ? m_sh1 : m_fr1;
        if (e0) begin m_sh1 = m_sh0; m_sh0 = par_in; end
        m_fr0 = n_fr0; m_fr1 = n_fr1; m_out = n_out;
      end
      checks++;
      if (q !== m_sh1 || par_out !== m_out) begin
        failures++;
        $display("cycle %0d: q=%h exp %h, par_out=%h exp %h", i, q, m_sh1, par_out, m_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
