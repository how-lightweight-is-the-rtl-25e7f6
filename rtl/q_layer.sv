// One quasigroup e-transformation layer (one Q-S-box round) on 4 bits.
//
// The 4-bit input is the string (x[3:2], x[1:0]). With leader l:
//   rtl = 0 (left to right): y[3:2] = l * x[3:2]; y[1:0] = y[3:2] * x[1:0]
//   rtl = 1 (right to left): y[1:0] = l * x[1:0]; y[3:2] = y[1:0] * x[3:2]
// Two 4x2 lookup tables form the chain; multiplexers pick, from rtl, which
// element enters the first table and where each table's result goes. With
// leader and direction as inputs, one instance serves every round of a
// multi-round Q-S-box. The direction alternation follows the worked example;
// putting both directions behind multiplexers in one layer is this design's
// choice. Purely combinational.
module q_layer
  import qsbox_pkg::*;
#(
  parameter qtable_t QG = QG_EX1
) (
  input  nibble_t x,       // input string
  input  elem_t   leader,  // leader of this round
  input  logic    rtl,     // 1: transform right to left
  output nibble_t y        // output string
);

  elem_t first_in, second_in, first_out, second_out;

  // The first element processed is the left one, or the right one when rtl
  always_comb begin
    first_in  = rtl ? x[1:0] : x[3:2];
    second_in = rtl ? x[3:2] : x[1:0];
  end

  quasigroup_lut #(.QG(QG)) u_first  (.a(leader),    .b(first_in),  .y(first_out));
  quasigroup_lut #(.QG(QG)) u_second (.a(first_out), .b(second_in), .y(second_out));

  always_comb y = rtl ? {second_out, first_out} : {first_out, second_out};

endmodule
