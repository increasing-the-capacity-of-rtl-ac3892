// Testbench for time_switch_t1 at its default size (256 channels).
//
// The incoming line carries a fresh random symbol in every external slot.
// The connection memory is filled with a random RAMD location per internal
// slot through the handshake port. Every bit on the internal line is then
// checked against a model of the report's rules: the symbol sent during
// external slot N-1 is stored at location N, and the word read during
// internal slot M is sent, most significant bit first, during slot M+1.
module tb_time_switch_t1;
  localparam int CH = 256;
  localparam int EW = $clog2(CH);
  localparam int TW = EW + 3;
  localparam int FRAMES = 6;
  localparam int NSLOT = FRAMES * CH + 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rx, tx, cfg_valid, cfg_ready;
  logic [EW:0]   cfg_addr;
  logic [EW-1:0] cfg_data;
  int   abs_clk = 0;
  logic [3:0] sent [NSLOT];
  logic [EW-1:0] cram [2*CH];
  int checks = 0, failures = 0, stalls = 0;
  int check_from;

  logic [TW-1:0] tsc;
  assign tsc = TW'(abs_clk);
  // bit b of the symbol of external slot e is on the line in phases 2b, 2b+1
  assign rx = sent[abs_clk / 8][3 - ((abs_clk % 8) / 2)];

  time_switch_t1 #(.CH(CH)) dut (
    .clk, .rst_n, .tsc, .rx, .tx, .cfg_valid, .cfg_ready, .cfg_addr, .cfg_data
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) abs_clk <= abs_clk + 1;

  initial begin
    #(10 * 8 * NSLOT);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected word on the internal line during absolute internal slot J
  function automatic logic [3:0] expected(int J);
    int rd_islot = J - 1;
    int cur_e = rd_islot / 2;
    int loc = cram[rd_islot % (2*CH)];
    int w = cur_e - ((cur_e - loc) % CH);
    return sent[w - 1];
  endfunction

  initial begin
    for (int i = 0; i < NSLOT; i++) sent[i] = 4'($urandom);
    for (int j = 0; j < 2*CH; j++) cram[j] = EW'($urandom);
    cfg_valid = 1'b0; cfg_addr = '0; cfg_data = '0;
    check_from = 1 << 30;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < 2*CH; j++) begin
      @(negedge clk);
      cfg_valid = 1'b1; cfg_addr = (EW+1)'(j); cfg_data = cram[j];
      #1;   // sample cfg_ready before the edge that takes the request
      while (!cfg_ready) begin stalls++; @(negedge clk); #1; end
      @(posedge clk);
      #1 cfg_valid = 1'b0;
    end
    // start checking one whole frame after the last write
    check_from = (abs_clk / 4 + 2*CH + 2) * 4;
  end

  always @(negedge clk) begin
    if (rst_n && abs_clk >= check_from) begin
      automatic int J = abs_clk / 4;
      automatic int q = abs_clk % 4;
      automatic logic [3:0] w = expected(J);
      checks++;
      if (tx !== w[3 - q]) begin
        failures++;
        if (failures < 10) $display("clk %0d islot %0d bit %0d: tx=%b exp word %h", abs_clk, J, q, tx, w);
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
