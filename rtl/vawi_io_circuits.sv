// vawi_io_circuits: column I/O circuits between the cell array and the
// K internal data lines.
//
// Each of the K column decoders owns D = 2^(COL_BITS-log2 K) adjacent columns
// and one internal data line. On a read the column picked by that decoder's
// one-hot select drives the line; on a write the line's value is steered onto
// the selected column's bit line and that column's write strobe is raised.
// A disabled decoder selects no column, so its line reads 0 and it writes
// nothing. The published design names these circuits (they share a box with the
// column decoder in its chip diagram) without describing them; this is the
// simplest circuit with that function.
//
// Interface: combinational. col_sel comes from the column decoder unit,
// row_q from the cell array; wr is the write strobe of the chip control.
module vawi_io_circuits
  import vawi_pkg::*;
#(
  parameter int unsigned K        = K_DEF,
  parameter int unsigned COL_BITS = COL_BITS_DEF,
  localparam int unsigned L       = $clog2(K),
  localparam int unsigned D       = 2**(COL_BITS - L),
  localparam int unsigned NCOL    = 2**COL_BITS
) (
  input  logic [NCOL-1:0] col_sel,
  input  logic [NCOL-1:0] row_q,
  input  logic            wr,
  input  logic [K-1:0]    line_in,
  output logic [K-1:0]    line_out,
  output logic [NCOL-1:0] bl_we,
  output logic [NCOL-1:0] bl_wdata
);

  always_comb begin
    for (int g = 0; g < int'(K); g++) begin
      line_out[g] = |(col_sel[g*D +: D] & row_q[g*D +: D]);
      for (int c = 0; c < int'(D); c++) begin
        bl_we[g*D + c]    = wr & col_sel[g*D + c];
        bl_wdata[g*D + c] = line_in[g];
      end
    end
  end

endmodule
