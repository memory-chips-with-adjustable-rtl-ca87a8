// vawi_ram: variable width RAM (VaWiRAM), top level.
//
// A static RAM of 2^(ROW_BITS+COL_BITS) bits whose data width can be set,
// access by access, to any power of two from 1 to K bits: by default a
// 1M x 1 chip that can also be used as 512k x 2, 256k x 4, 128k x 8 or
// 64k x 16. The row decoder and the cell array are conventional. Width
// programmability is confined to three units, all steered by the same
// control values MC1..MC(L), L = log2 K, from the mode control unit:
//   - the programmable column address decoder enables 1, 2, .. K of its K
//     column decoders, ignoring one more of the top address bits each time
//     the width doubles,
//   - the programmable output data control unit joins the K internal data
//     lines into W output bits with a pass-gate tree,
//   - the programmable input data control unit does the same on the input
//     side.
//
// Address map. The address is A0..A19 (default). A0..A9 select the row,
// A10..A15 select one of 64 columns within each column decoder, A16..A19 pick
// the decoder in the 1-bit configuration. In a configuration of width 2^m the
// top m address bits are not used for addressing; data pin Dj of that
// configuration holds the cell the 1-bit configuration reaches with A(19-b)
// replaced by bit b of j (b < m). For example D1 of the 2-bit configuration
// at address a is the 1-bit cell at address a + 2^19.
//
// Mode pins. With SCHEME = MCU_SHARED (default) there is one mode pin, M; in
// the wider configurations the unused top address bits carry the rest of the
// mode (M=0: 1 bit; M=1 and A19=0: 2 bits; A19..A18 = 10: 4 bits;
// A19..A17 = 110: 8 bits; A19..A17 = 111: 16 bits). With SCHEME = MCU_ENCODED
// there are 3 mode pins holding a code 0..4 for 16, 8, 4, 2, 1 bits.
//
// Control and timing. s is the chip select (active high), w_n the write
// enable (active low). Reads are combinational: dout follows addr, mode and
// the cell contents in the same cycle, with dout_oe = 1 while s = 1 and
// w_n = 1 (dout is 0 otherwise). A write (s = 1, w_n = 0) stores din on the
// rising edge of clk. The clock exists only to give writes a defined instant;
// it is this design's choice, the published design treats the chip as an ordinary
// asynchronous RAM. Data pins are split into din, dout and dout_oe because the
// model has no tri-state pins.
module vawi_ram
  import vawi_pkg::*;
#(
  parameter int unsigned K        = K_DEF,
  parameter int unsigned ROW_BITS = ROW_BITS_DEF,
  parameter int unsigned COL_BITS = COL_BITS_DEF,
  parameter mcu_scheme_e SCHEME   = MCU_SHARED,
  localparam int unsigned L       = $clog2(K),
  localparam int unsigned NMP     = num_mode_pins(SCHEME, K),
  localparam int unsigned WLW     = $clog2(L + 1),
  localparam int unsigned AW      = ROW_BITS + COL_BITS,
  localparam int unsigned NCOL    = 2**COL_BITS
) (
  input  logic           clk,
  input  logic           s,
  input  logic           w_n,
  input  logic [NMP-1:0] mode_pins,
  input  logic [AW-1:0]  addr,
  input  logic [K-1:0]   din,
  output logic [K-1:0]   dout,
  output logic           dout_oe,
  output logic [WLW-1:0] width_log2
);

  logic            access, wr, rd;
  logic [L-1:0]    mc;
  logic [K-1:0]    dec_en;
  logic [NCOL-1:0] col_sel, row_q, bl_we, bl_wdata;
  logic [K-1:0]    line_in, line_out;

  vawi_rw_ctrl u_ctrl (.s(s), .w_n(w_n), .access(access), .wr(wr), .rd(rd));

  vawi_mcu #(.K(K), .SCHEME(SCHEME)) u_mcu (
    .mode_pins  (mode_pins),
    .addr_hi    (addr[AW-1 -: L]),
    .mc         (mc),
    .width_log2 (width_log2)
  );

  vawi_pcadu #(.K(K), .COL_BITS(COL_BITS)) u_pcadu (
    .access   (access),
    .col_addr (addr[AW-1:ROW_BITS]),
    .mc       (mc),
    .dec_en   (dec_en),
    .col_sel  (col_sel)
  );

  vawi_cell_array #(.ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS)) u_array (
    .clk      (clk),
    .row_addr (addr[ROW_BITS-1:0]),
    .bl_we    (bl_we),
    .bl_wdata (bl_wdata),
    .row_q    (row_q)
  );

  vawi_io_circuits #(.K(K), .COL_BITS(COL_BITS)) u_io (
    .col_sel  (col_sel),
    .row_q    (row_q),
    .wr       (wr),
    .line_in  (line_in),
    .line_out (line_out),
    .bl_we    (bl_we),
    .bl_wdata (bl_wdata)
  );

  vawi_pidcu #(.K(K)) u_pidcu (.mc(mc), .din(din), .line(line_in));

  vawi_podcu #(.K(K)) u_podcu (
    .mc       (mc),
    .line     (line_out),
    .line_drv (dec_en),
    .oe       (rd),
    .dout     (dout),
    .dout_oe  (dout_oe)
  );

  // During an access exactly 2^width_log2 decoders are enabled: one per data
  // net of the pass-gate trees, so no net has two drivers and none floats.
  always_comb if (access) assert ($countones(dec_en) == (1 << width_log2))
    else $error("vawi_ram: %0d column decoders enabled in a %0d-bit configuration",
                $countones(dec_en), 1 << width_log2);

endmodule
