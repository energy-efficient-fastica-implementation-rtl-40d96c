// nwmm: new weight matrix memory, 64 x 32 dual-port.
//
// Holds the eight weight vectors produced in the current iteration (address =
// vector * 8 + element). Port A writes (wa_en), port B reads (rb_en) with one
// cycle latency, both in the same cycle if needed; a read of the address being
// written returns the old word. The chip specifies a dual-port macro; splitting
// it into one write and one read port is this design's choice.
module nwmm #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wa_en,
  input  logic [AW-1:0]    wa_addr,
  input  logic [WIDTH-1:0] wa_data,
  input  logic             rb_en,
  input  logic [AW-1:0]    rb_addr,
  output logic [WIDTH-1:0] rb_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wa_en) mem[wa_addr] <= wa_data;
    if (rb_en) rb_data      <= mem[rb_addr];
  end
endmodule
