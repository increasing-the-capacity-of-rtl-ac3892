// Single-port RAM block, as produced by a RAM cell generator.
//
// One access per clock: with ME high and NWE low the word DI is written at
// address A; with ME high and NWE high the word at A is read and appears on
// DOUT after the clock edge. DOUT holds the last word read while the RAM is
// idle or writing, so a connection memory can drive a select bus straight
// from DOUT. The pin names ME, NWE, A and DI follow the RAM symbols of the
// report; the synchronous read and the holding output register are this
// design's choices. The array has no reset, like a real RAM.
module sram_sp #(
  parameter int unsigned WORDS = 128,
  parameter int unsigned WIDTH = 6,
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic             clk,
  input  logic             me,     // memory enable
  input  logic             nwe,    // 1 = read, 0 = write
  input  logic [AW-1:0]    a,
  input  logic [WIDTH-1:0] di,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (me && !nwe) mem[a] <= di;
  end

  always_ff @(posedge clk) begin
    if (me && nwe) dout <= mem[a];
  end

endmodule
