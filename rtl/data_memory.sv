// data_memory: the 2048 x 32 single-port data memory of the FastICA engine.
//
// One synchronous port: when en is high a write (we=1) stores wdata at addr, a
// read (we=0) returns the word at addr on rdata one cycle later. The read data
// register holds its value when en is low. The same array holds, over one run, the
// 12-bit input samples, the 18-bit centered samples (both sign-extended to 32
// bits), the floating-point whitened data Z and finally the separated signals;
// address = channel * 256 + sample. Size and single-port organisation follow
// the chip's memory specification; the read latency is this design's choice.
module data_memory #(
  parameter int unsigned DEPTH = 2048,
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
