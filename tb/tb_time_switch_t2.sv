// Testbench for time_switch_t2 at its default size (256 external slots).
//
// The internal line carries a fresh random symbol in every internal slot,
// one bit per clock. The connection memory gets a random internal slot per
// external slot through the handshake port. Every bit of the outgoing line
// is checked against a model of the report's rules: a symbol arriving
// during internal slot N-1 is stored at location N, and the word read
// during external slot M leaves during slot M+1 (each bit for 2 clocks).
module tb_time_switch_t2;
  localparam int CH = 256;
  localparam int EW = $clog2(CH);
  localparam int TW = EW + 3;
  localparam int FRAMES = 6;
  localparam int NISLOT = FRAMES * 2 * CH + 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rx, tx, cfg_valid, cfg_ready;
  logic [EW-1:0] cfg_addr;
  logic [EW:0]   cfg_data;
  int   abs_clk = 0;
  logic [3:0] sent [NISLOT];
  logic [EW:0] cram [CH];
  int checks = 0, failures = 0, stalls = 0;
  int check_from;

  logic [TW-1:0] tsc;
  assign tsc = TW'(abs_clk);
  assign rx  = sent[abs_clk / 4][3 - (abs_clk % 4)];

  time_switch_t2 #(.CH(CH)) dut (
    .clk, .rst_n, .tsc, .rx, .tx, .cfg_valid, .cfg_ready, .cfg_addr, .cfg_data
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) abs_clk <= abs_clk + 1;

  initial begin
    #(10 * 4 * NISLOT);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected word on the outgoing line during absolute external slot E
  function automatic logic [3:0] expected(int E);
    int m = E - 1;                   // slot in which it was read
    int loc = cram[m % CH];
    int now = 2 * m;                 // read happens in the even internal slot
    int w = now - ((now - loc) % (2*CH));
    return sent[w - 1];
  endfunction

  initial begin
    for (int i = 0; i < NISLOT; i++) sent[i] = 4'($urandom);
    for (int j = 0; j < CH; j++) cram[j] = (EW+1)'($urandom);
    cfg_valid = 1'b0; cfg_addr = '0; cfg_data = '0;
    check_from = 1 << 30;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < CH; j++) begin
      @(negedge clk);
      cfg_valid = 1'b1; cfg_addr = EW'(j); cfg_data = cram[j];
      #1;   // sample cfg_ready before the edge that takes the request
      while (!cfg_ready) begin stalls++; @(negedge clk); #1; end
      @(posedge clk);
      #1 cfg_valid = 1'b0;
    end
    check_from = (abs_clk / 8 + CH + 2) * 8;
  end

  always @(negedge clk) begin
    if (rst_n && abs_clk >= check_from) begin
      automatic int E = abs_clk / 8;
      automatic int b = (abs_clk % 8) / 2;
      automatic logic [3:0] w = expected(E);
      checks++;
      if (tx !== w[3 - b]) begin
        failures++;
        if (failures < 10) $display("clk %0d eslot %0d bit %0d: tx=%b exp word %h", abs_clk, E, b, tx, w);
      end
      if (abs_clk >= check_from + 2 * 8 * CH) begin
        checks++;
        if (stalls == 0) begin failures++; $display("no handshake stall seen"); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
