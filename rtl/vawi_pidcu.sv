// vawi_pidcu: Programmable Input Data Control Unit.
//
// The input-side twin of the output data control unit: the same pass-gate
// tree, controlled by the same values MC1..MC(L), joins the data input pins to
// the K internal data lines. In a w-bit configuration the word is taken from
// pins D0..D(w-1) and pin j drives every line i with i mod w = j; the only one
// of those lines that reaches the cell array is the one whose column decoder
// is enabled. Modelled as a wired net with one driver: each line takes the
// lowest-numbered pin on its net (pin i mod w). The upper pins are joined to
// the same nets in the real circuit and must be left undriven; here they are
// ignored. The published design gives the function of this unit and refers to the
// output unit for its insides.
//
// Interface: combinational.
module vawi_pidcu
  import vawi_pkg::*;
#(
  parameter int unsigned K = K_DEF,
  localparam int unsigned L = $clog2(K)
) (
  input  logic [L-1:0] mc,
  input  logic [K-1:0] din,
  output logic [K-1:0] line
);

  logic [K*L-1:0] root;

  vawi_passgate_net #(.K(K)) u_net (.mc(mc), .root(root));

  always_comb begin
    for (int i = 0; i < int'(K); i++) line[i] = din[root[i*L +: L]];
  end

endmodule
