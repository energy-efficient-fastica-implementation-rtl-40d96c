// owmm: old weight matrix memory, 64 x 32 single-port.
//
// Holds the eight weight vectors of the previous iteration, eight IEEE-754
// words each (address = vector * 8 + element). One synchronous port: a write
// (en & we) stores wdata, a read (en & ~we) returns the word on rdata the next
// cycle. Size and single-port organisation follow the chip's memory table.
module owmm #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
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
