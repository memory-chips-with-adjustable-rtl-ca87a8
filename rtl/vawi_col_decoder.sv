// vawi_col_decoder: one N-to-2^N column decoder with enable.
//
// Drives exactly one of its 2^N select lines high when en is 1 (the line
// numbered by a) and none when en is 0. The programmable column decoder uses
// K of these side by side (sixteen 6-to-64 decoders by default); which of
// them are enabled decides the configured width. Purely combinational.
module vawi_col_decoder #(
  parameter int unsigned N = 6
) (
  input  logic           en,
  input  logic [N-1:0]   a,
  output logic [2**N-1:0] y
);

  always_comb begin
    for (int i = 0; i < 2**N; i++) y[i] = en && (a == N'(i));
  end

endmodule
