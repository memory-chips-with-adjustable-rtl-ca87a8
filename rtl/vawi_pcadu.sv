// vawi_pcadu: Programmable Column Address Decoder Unit.
//
// The column address has COL_BITS bits in the 1-bit configuration (A10..A19
// by default) and COL_BITS - log2(K) bits in the widest one. The unit is
// built in two stages, as the published design prescribes:
//  1. a stage of 2-to-1 selectors. For every one of the top L = log2(K)
//     column address bits it forms a true and a complement literal; each
//     selector passes the address literal when the matching control value
//     mc[b] is 1 and a constant 1 (don't care) when mc[b] is 0.
//  2. K decoders of COL_BITS-L inputs each (sixteen 6-to-64 by default). All
//     share the low column bits (A10..A15). Decoder g is enabled when every
//     literal picked by the bits of g is 1.
// The result: in the 1-bit configuration exactly one decoder is enabled, in
// the 2-, 4-, 8- and 16-bit configurations 2, 4, 8 or all 16 are.
//
// Index mapping (this design's choice, made to agree with the pass-gate trees
// of the data control units): decoder index bit b is compared with column
// address bit COL_BITS-1-b, so the top address bit (A19) picks index bit 0.
// The bits dropped first when the width doubles are therefore the top
// address bits, the same bits the shared mode scheme reuses for mode
// information. The wiring of the selector stage is this design's own: the
// published design counts K/2 selectors, this stage uses 2*log2(K), which is the same
// number at the default K = 16 and fewer for larger K.
//
// Interface: combinational. access gates all decoders (no column is selected
// between accesses). col_sel[g*D + c] is select line c of decoder g,
// D = 2^(COL_BITS-L). dec_en[g] tells which decoders are enabled.
module vawi_pcadu
  import vawi_pkg::*;
#(
  parameter int unsigned K        = K_DEF,
  parameter int unsigned COL_BITS = COL_BITS_DEF,
  localparam int unsigned L       = $clog2(K),
  localparam int unsigned DI      = COL_BITS - L,
  localparam int unsigned D       = 2**DI
) (
  input  logic                access,
  input  logic [COL_BITS-1:0] col_addr,
  input  logic [L-1:0]        mc,
  output logic [K-1:0]        dec_en,
  output logic [K*D-1:0]      col_sel
);

  // Stage 1: selectors producing the enable literals
  logic [L-1:0] lit_t, lit_f;
  always_comb begin
    for (int b = 0; b < int'(L); b++) begin
      lit_t[b] = mc[b] ?  col_addr[COL_BITS-1-b] : 1'b1;
      lit_f[b] = mc[b] ? ~col_addr[COL_BITS-1-b] : 1'b1;
    end
  end

  // Decoder enables
  always_comb begin
    for (int g = 0; g < int'(K); g++) begin
      logic e;
      e = access;
      for (int b = 0; b < int'(L); b++) e &= (((g >> b) & 1) != 0) ? lit_t[b] : lit_f[b];
      dec_en[g] = e;
    end
  end

  // Stage 2: K decoders sharing the low column address bits
  for (genvar g = 0; g < int'(K); g++) begin : g_dec
    vawi_col_decoder #(.N(DI)) u_dec (
      .en (dec_en[g]),
      .a  (col_addr[DI-1:0]),
      .y  (col_sel[g*D +: D])
    );
  end

endmodule
