// line_buffer: a double-buffered line memory for one sprite line.
//
// It holds NBANK banks of DEPTH 64-bit words; with the default DEPTH of
// MAX_SPW/2 = 32 words a bank holds one 64-pixel sprite line. It has one
// synchronous write port and one asynchronous read port, a simple two-port
// memory that maps onto LUT RAM, as the document asks of its line buffers.
// The read stage fills one bank while the write stage reads the other,
// which lets the two stages overlap (the document's dataflow between the
// stages); the bank count of two is this design's choice.
//
// Timing: a write (we high at a clock edge) is visible to the read port
// from the next cycle; the read port is combinational.
module line_buffer
  import sprite_pkg::*;
#(
  parameter int unsigned DEPTH = MAX_SPW_DEF / 2,  // words per bank
  parameter int unsigned NBANK = 2                 // number of banks
) (
  input  logic                     clk,
  // write port
  input  logic                     we,
  input  logic [$clog2(NBANK)-1:0] wbank,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  word_t                    wdata,
  // read port
  input  logic [$clog2(NBANK)-1:0] rbank,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output word_t                    rdata
);

  word_t mem [NBANK][DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wbank][waddr] <= wdata;
  end

  assign rdata = mem[rbank][raddr];

endmodule
