// vawi_rw_ctrl: chip read/write control of the variable-width RAM.
//
// Combines the chip select S and the active-low write enable W# (the two
// control inputs of the chip diagram) into the internal strobes: wr, the write
// strobe of the input data control and I/O circuits, rd, the output enable of
// the output data control unit, and access, which enables the column
// decoders. The pin polarities (S active high, W# active low) follow the pin
// names; the published design does not describe this logic further.
//
//   S  W#  | access wr rd
//   0  x   |   0    0  0     chip deselected, outputs off
//   1  0   |   1    1  0     write
//   1  1   |   1    0  1     read
//
// Combinational.
module vawi_rw_ctrl (
  input  logic s,
  input  logic w_n,
  output logic access,
  output logic wr,
  output logic rd
);

  always_comb begin
    access = s;
    wr     = s & ~w_n;
    rd     = s &  w_n;
  end

endmodule
