// Quasigroup operation of order 4 as a 4x2-bit lookup table.
//
// y = a * b, where the table QG holds a*b at entry (4*a + b). This is the
// only non-linear element of a Q-S-box: every Q-S-box form in this design is
// built from instances of it. Purely combinational; the table is a
// parameter so that any quasigroup of order 4 can be synthesized (the sample
// non-linear quasigroup is the default).
module quasigroup_lut
  import qsbox_pkg::*;
#(
  parameter qtable_t QG = QG_EX1
) (
  input  elem_t a,   // left operand
  input  elem_t b,   // right operand
  output elem_t y    // a * b
);

  always_comb y = QG[{a, b}];

endmodule
