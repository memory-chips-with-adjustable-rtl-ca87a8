// vawi_mcu: Mode Control Unit of the variable-width RAM.
//
// Turns the user's mode information into the control values MC1..MC(L),
// L = log2(K), that steer the pass-gate trees of the input and output data
// control units and the selector stage of the column decoder. mc[b] is MC(b+1);
// mc[b] = 1 closes the pass gates that join data lines 2^b apart and makes
// the column decoder use one more address bit.
//
// The control values form a thermometer code (published value table of the
// five configurations for K=16):
//   16 bit wide: MC4..MC1 = 0000    8 bit: 1000    4 bit: 1100
//    2 bit wide:            1110    1 bit: 1111
//
// Two ways of delivering the mode are supported, chosen by SCHEME:
//  * MCU_ENCODED: mode_pins holds a code n; n = 0 is the widest (W_MAX)
//    configuration and each increment halves the width (published mode table,
//    000 -> 16 bit ... 100 -> 1 bit). Codes above log2(K) are not given by the
//    published design; this design treats them as the 1-bit configuration, which is
//    what the simplest gate-level reading of that table (MC1 = M3) gives.
//  * MCU_SHARED: one pin M. M = 0 selects the narrowest configuration. With
//    M = 1 the highest address bits, which the wider configurations do not
//    need, carry the rest: scanning from the top address bit down, each 1
//    doubles the width once more and the first 0 ends the scan; all ones on
//    the top L-1 bits give the widest configuration (published table of
//    address pins combined with mode pins).
//
// Interface: purely combinational. addr_hi[L-1] is the top address bit (A19
// by default) and addr_hi[0] the lowest of the top L bits (A16). width_log2 is
// log2 of the configured width. The unit has no clock; it follows its inputs
// within the same cycle, so the width can change from one access to the next.
module vawi_mcu
  import vawi_pkg::*;
#(
  parameter int unsigned K      = K_DEF,
  parameter mcu_scheme_e SCHEME = MCU_SHARED,
  localparam int unsigned L     = $clog2(K),
  localparam int unsigned NMP   = num_mode_pins(SCHEME, K),
  localparam int unsigned WLW   = $clog2(L + 1)
) (
  input  logic [NMP-1:0] mode_pins,
  input  logic [L-1:0]   addr_hi,
  output logic [L-1:0]   mc,
  output logic [WLW-1:0] width_log2
);

  // n = number of halvings from W_MAX (0 .. L)
  logic [WLW-1:0] n;
  // number of consecutive ones on addr_hi[L-1:1], counted from the top
  logic [WLW-1:0] lead_ones;

  always_comb begin
    logic stop;
    stop      = 1'b0;
    lead_ones = '0;
    for (int i = int'(L) - 1; i >= 1; i--) begin
      stop = stop | ~addr_hi[i];
      if (!stop) lead_ones = lead_ones + 1'b1;
    end
  end

  always_comb begin
    if (SCHEME == MCU_ENCODED) begin
      if (32'(mode_pins) > L) n = WLW'(L);
      else                    n = WLW'(mode_pins);
    end else if (mode_pins[0] == 1'b0) begin
      n = WLW'(L);
    end else begin
      n = WLW'(L - 1) - lead_ones;
    end
  end

  always_comb begin
    for (int b = 0; b < int'(L); b++) mc[b] = (32'(n) + 32'(b) >= L);
    width_log2 = WLW'(L) - n;
  end

endmodule
