// spram: single-port synchronous SRAM, the memory macro of which four make up a
// 4-way memory bank (2048x32 for DM0, DM1 and CM, 1024x32 for DM2).
//
// One access per cycle: when en is high a write (we=1) stores wdata at addr, a
// read (we=0) returns the word at addr on rdata in the next cycle. rdata holds
// its value while en is low. Written as an array so that synthesis infers a
// memory; a foundry macro of the same size and port list replaces it. The
// contents start at zero so that simulation reads defined values.
module spram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned RW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [RW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
