// vawi_pkg: constants and types shared by the variable-width RAM (VaWiRAM).
//
// The default organisation is a 1M x 1 bit array that can be configured as
// 1M x 1, 512k x 2, 256k x 4, 128k x 8 or 64k x 16 bits. The array has a
// hardwired 10-bit row decoder (address A0..A9) and a programmable column
// decoder (A10..A19). The maximum width W_MAX is 16, the minimum width is 1,
// so the width variability factor K is 16 and there are log2(K)+1 = 5 widths.
// These numbers follow the published worked example. The enumeration of the
// two mode-pin schemes is this design's own naming.
package vawi_pkg;

  // Defaults of the worked example
  localparam int unsigned ROW_BITS_DEF = 10;  // A0..A9 to the row decoder
  localparam int unsigned COL_BITS_DEF = 10;  // A10..A19 to the column decoder
  localparam int unsigned K_DEF        = 16;  // width variability factor = W_MAX

  // How mode information reaches the chip.
  //  MCU_ENCODED: ceil(log2(log2(K)+1)) dedicated mode pins (3 pins for K=16),
  //               code n selects width W_MAX / 2^n.
  //  MCU_SHARED : one dedicated pin M; the remaining mode information rides on
  //               the address pins that the wider configurations do not need.
  typedef enum logic {
    MCU_ENCODED = 1'b0,
    MCU_SHARED  = 1'b1
  } mcu_scheme_e;

  // Number of dedicated mode pins for a scheme and a width variability factor.
  function automatic int unsigned num_mode_pins(mcu_scheme_e scheme, int unsigned k);
    if (scheme == MCU_SHARED) return 1;
    return $clog2($clog2(k) + 1);
  endfunction

endpackage
