// vawi_podcu: Programmable Output Data Control Unit.
//
// Sits between the K internal data lines and the K data output pins. A tree
// of K-1 pass gates in log2(K) levels (15 gates in 4 levels for K = 16) joins
// the lines: with MC4 closed line i is joined to line i+8 and the chip is 8
// bits wide, with MC4 and MC3 closed lines i, i+4, i+8, i+12 form one net and
// the chip is 4 bits wide, and so on down to all 16 lines on one net in the
// 1-bit configuration. In every group exactly one line is driven, by the one
// column decoder the address enables, so each net carries one data bit.
//
// A pass-gate net has no digital direction; here it is modelled as a wired
// connection with one driver: every pin shows the OR of the driven lines on
// its net (line_drv marks the lines whose decoder is enabled; the rest float
// and contribute nothing). In a w-bit configuration pins D0..D(w-1) carry the
// word; pin j >= w is joined to pin j mod w and repeats its value, as the
// shorted pins of the pass-gate tree would. oe gates the pins (the two-state
// stand-in for the output buffers' high impedance, reported on dout_oe).
//
// Interface: combinational. The published estimate adds one transistor delay for this
// unit, i.e. no clock cycle.
module vawi_podcu
  import vawi_pkg::*;
#(
  parameter int unsigned K = K_DEF,
  localparam int unsigned L = $clog2(K)
) (
  input  logic [L-1:0] mc,
  input  logic [K-1:0] line,
  input  logic [K-1:0] line_drv,
  input  logic         oe,
  output logic [K-1:0] dout,
  output logic         dout_oe
);

  logic [K*L-1:0] root;

  vawi_passgate_net #(.K(K)) u_net (.mc(mc), .root(root));

  always_comb begin
    for (int j = 0; j < int'(K); j++) begin
      dout[j] = 1'b0;
      for (int i = 0; i < int'(K); i++)
        if (root[i*L +: L] == root[j*L +: L]) dout[j] |= line[i] & line_drv[i];
      dout[j] &= oe;
    end
    dout_oe = oe;
  end

  // The mode control unit only produces thermometer codes: MC(b+1) closed
  // implies MC(b+2) closed.
  for (genvar b = 0; b + 1 < int'(L); b++) begin : g_chk
    always_comb if (oe) assert (!(mc[b] && !mc[b+1]))
      else $error("vawi_podcu: control values are not a width code");
  end

endmodule
