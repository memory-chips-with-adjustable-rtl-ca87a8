// vawi_cell_array: memory cell array with its hardwired row decoder.
//
// 2^ROW_BITS rows by 2^COL_BITS columns of single-bit cells (1024 x 1024 =
// 1M bits by default). Seen from the column side the array is 2^COL_BITS
// columns of 1k x 1 cells each. The row address (A0..A9) is decoded here and
// is never reconfigured; all width programmability lives in the column
// decoder and the data control units.
//
// Interface: the addressed row is presented on row_q combinationally, like
// the bit lines of a static RAM after sensing. A column whose bl_we bit is 1
// takes bl_wdata on the rising clock edge; the other cells of the row keep
// their contents. The cells are not reset (a RAM powers up with unknown data).
// The clock edge as write instant is this design's choice; the published design treats
// the chip as an asynchronous RAM and does not describe its timing.
module vawi_cell_array
  import vawi_pkg::*;
#(
  parameter int unsigned ROW_BITS = ROW_BITS_DEF,
  parameter int unsigned COL_BITS = COL_BITS_DEF,
  localparam int unsigned ROWS    = 2**ROW_BITS,
  localparam int unsigned NCOL    = 2**COL_BITS
) (
  input  logic                clk,
  input  logic [ROW_BITS-1:0] row_addr,
  input  logic [NCOL-1:0]     bl_we,
  input  logic [NCOL-1:0]     bl_wdata,
  output logic [NCOL-1:0]     row_q
);

  logic [NCOL-1:0] mem [ROWS];

  assign row_q = mem[row_addr];

  always_ff @(posedge clk) begin
    if (|bl_we) mem[row_addr] <= (mem[row_addr] & ~bl_we) | (bl_wdata & bl_we);
  end

endmodule
