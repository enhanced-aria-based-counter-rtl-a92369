// aria_sbox: one ARIA S-box as a 256-entry lookup table.
//
// KIND selects SB1 (1), SB2 (2), SB3 = SB1^-1 (3) or SB4 = SB2^-1 (4). The tables are
// the constant aria_pkg::SBOX, computed at elaboration from the algebraic
// definitions, so no data file is needed; in hardware each instance is a plain
// 8-in/8-out combinational ROM. Purely combinational, no clock.
module aria_sbox
  import aria_pkg::*;
#(
  parameter int unsigned KIND = 1
) (
  input  logic [7:0] i_x,
  output logic [7:0] o_y
);

  assign o_y = SBOX[KIND-1][i_x];

endmodule
