// sram_sp: single-port synchronous SRAM, one read or one write per cycle.
// Used for the current-pixel SRAM and for SRAM1/SRAM2 of the reference
// memory; words are 16 pixels (128 bits) wide. A write stores wdata at addr;
// a read returns mem[addr] on rdata one clock later. rdata keeps its value on
// a write cycle. The contents are not reset. This is a behaviour-level array
// standing in for an SRAM macro; depth is set by the instantiating block.
module sram_sp #(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned WIDTH  = 128,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
