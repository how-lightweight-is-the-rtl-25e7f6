// Fully unrolled Q-S-box: a 4-bit bijection built from QS_LAYERS (4) chained
// quasigroup e-transformation layers, each made of two 4x2 lookup tables.
//
// Layer i uses leader LEADERS[i] and runs left to right for even i and right
// to left for odd i. With the default quasigroup and leaders (1, 3, 1, 3)
// the map is the sample Q-S-box
//   S(x) = E 6 C B 0 1 8 2 D 3 A F 9 5 4 7  for x = 0..F.
// Other non-linear quasigroups and leaders give other S-boxes from the same
// circuit by changing the parameters. Purely combinational, no clock.
module qsbox_comb
  import qsbox_pkg::*;
#(
  parameter qtable_t  QG      = QG_EX1,
  parameter leaders_t LEADERS = LEADERS_EX1
) (
  input  nibble_t x,
  output nibble_t y
);

  nibble_t stage [QS_LAYERS+1];

  assign stage[0] = x;

  for (genvar i = 0; i < QS_LAYERS; i++) begin : g_layer
    q_layer #(.QG(QG)) u_layer (
      .x     (stage[i]),
      .leader(LEADERS[i]),
      .rtl   (1'(i % 2)),
      .y     (stage[i+1])
    );
  end

  assign y = stage[QS_LAYERS];

endmodule
