// temporal_buffer: single-port RAM holding the lifting-core registers of
// every column of the image (the "temporal buffer" of a line-based DWT).
//
// One word per image column; a word is the four registers of the column
// lifting core. Because the multiple-lifting schedule never reads and writes
// in the same cycle, one port suffices: en starts an access, we selects a
// write of wdata to addr, otherwise a read of addr whose data appears on
// rdata after the next clock edge and is held until the next read. Contents
// are not reset (a RAM macro would not be); the controller never uses a word
// before the image's first step of that column has written it.
// The single port and the depth (image width) follow the document; the
// synchronous read with one cycle of latency is this design's choice.
module temporal_buffer #(
  parameter int DEPTH = 128,  // image width
  parameter int WIDTH = 64,   // four 16-bit registers
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
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
