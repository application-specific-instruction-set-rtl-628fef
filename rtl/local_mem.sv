// local_mem: the ASIP's small local pixel memory.
//
// Two byte-wide arrays: one holds the 16x16 current macroblock (256 bytes,
// row-major, row stride 16), the other holds the search area of SA_DIM x
// SA_DIM reference pixels, stored row-major with a row stride of SA_STRIDE
// (the next power of two, so that a pixel's address is {row, column}).
// One write port, used by the AGU's loader, writes either array. Two
// asynchronous read ports, one per array, feed the SADU a macroblock pixel and
// a candidate pixel in the same cycle.
// The document gives only the memory's purpose (hold a macroblock and its
// search area); the split into two arrays, the row strides and the read-port
// arrangement are this design's choices.
module local_mem
  import asip_pkg::*;
#(
  parameter int unsigned SA_DIM    = 31,
  parameter int unsigned SA_STRIDE = 2 ** $clog2(SA_DIM),
  parameter int unsigned SA_AW     = $clog2(SA_STRIDE * SA_DIM)
) (
  input  logic             clk,
  input  logic             we,
  input  logic             wsel,      // 0 = macroblock array, 1 = search-area array
  input  logic [SA_AW-1:0] waddr,     // macroblock array uses the low 8 bits
  input  pixel_t           wdata,
  input  logic [7:0]       mb_raddr,
  output pixel_t           mb_rdata,
  input  logic [SA_AW-1:0] sa_raddr,
  output pixel_t           sa_rdata
);

  localparam int unsigned SA_WORDS = SA_STRIDE * SA_DIM;

  pixel_t mb_mem [MB_N * MB_N];
  pixel_t sa_mem [SA_WORDS];

  always_ff @(posedge clk) begin
    if (we && !wsel) mb_mem[waddr[7:0]] <= wdata;
    if (we && wsel && (32'(waddr) < SA_WORDS)) sa_mem[waddr] <= wdata;
  end

  always_comb begin
    mb_rdata = mb_mem[mb_raddr];
    sa_rdata = (32'(sa_raddr) < SA_WORDS) ? sa_mem[sa_raddr] : '0;
  end

endmodule
