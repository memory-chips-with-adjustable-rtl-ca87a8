// vawi_passgate_net: connectivity of the pass-gate tree that joins the K
// data lines of the variable-width RAM.
//
// The tree has log2(K) levels and K-1 pass gates; the gates of one level share
// one control value. mc[b] (MC(b+1)) drives 2^b gates: MC4 eight, MC3 four,
// MC2 two and MC1 one for K = 16 (15 gates, as the published design counts).
//
// Wiring. For the default K = 16 the gates join the line pairs of the
// published drawing:
//   MC4: D0-D8, D1-D9, D2-D10, D3-D11, D4-D12, D5-D13, D6-D14, D7-D15
//   MC3: D4-D8, D5-D9, D6-D10, D7-D11
//   MC2: D2-D12, D3-D13
//   MC1: D0-D1
// For other K this design uses the analogous wiring r to r + 2^b
// (r < 2^b). For every thermometer code the mode control unit produces, both
// join the lines whose numbers agree modulo the configured width.
//
// Either way the gates form a tree rooted at line 0 in which line i > 0 hangs
// from one parent line through a gate of level msb(i). A closed gate is
// modelled as a short between two nets. The module labels each line with the
// highest line of the tree it still reaches through closed gates:
// root[i] = root[parent(i)] when the gate to the parent is closed, i otherwise.
// Two lines share a net exactly when their labels are equal, and for
// thermometer codes the label is the lowest-numbered line of the net, i.e. the
// data pin that serves it. Lines are visited parents first. Combinational.
module vawi_passgate_net
  import vawi_pkg::*;
#(
  parameter int unsigned K = K_DEF,
  localparam int unsigned L = $clog2(K)
) (
  input  logic [L-1:0]   mc,
  output logic [K*L-1:0] root
);

  // Drawing of the 16-line tree: parent of each line and a visiting order in
  // which every parent comes before its children.
  localparam int FIG_PARENT [16] = '{0, 0, 12, 13, 8, 9, 10, 11, 0, 1, 2, 3, 4, 5, 6, 7};
  localparam int FIG_ORDER  [16] = '{0, 8, 1, 4, 12, 2, 10, 6, 14, 9, 5, 13, 3, 11, 7, 15};

  always_comb begin
    logic [L-1:0] r [K];
    for (int i = 0; i < int'(K); i++) r[i] = L'(i);
    for (int n = 1; n < int'(K); n++) begin
      int i, hb, par;
      i  = (K == 16) ? FIG_ORDER[n % 16] : n;
      hb = 0;
      for (int b = 0; b < int'(L); b++) if (((i >> b) & 1) != 0) hb = b;
      par = (K == 16) ? FIG_PARENT[i % 16] : i - (1 << hb);
      r[i] = mc[hb] ? r[par] : L'(i);
    end
    for (int i = 0; i < int'(K); i++) root[i*L +: L] = r[i];
  end

endmodule
