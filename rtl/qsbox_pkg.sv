// Shared types and constants for the quasigroup S-box (Q-S-box) designs.
//
// A quasigroup of order 4 is a 4x4 Latin square over the elements {0,1,2,3}.
// Each element is 2 bits wide, so the operation a*b is a 4-input, 2-output
// lookup table. A 4-bit S-box input is read as a string of two elements: the
// high pair x[3:2] is the left element, the low pair x[1:0] the right element.
//
// A Q-S-box is built from LAYERS e-transformations (Q-S-box rounds). Layer i
// uses leader LEADERS[i]. Even layers (0, 2, ...) run left to right:
//   y_left = l * x_left,  y_right = y_left * x_right
// Odd layers run right to left:
//   y_right = l * x_right, y_left = y_right * x_left
// The quasigroup, the two leaders (1 and 3), the alternation of direction and
// the element order follow the worked example that defines the sample S-box;
// QSBOX_EX1 is that sample S-box, used only by testbenches as a golden table.
// Packing the tables into flat packed arrays is this design's own choice.
package qsbox_pkg;

  typedef logic [1:0] elem_t;            // one quasigroup element
  typedef logic [3:0] nibble_t;          // one S-box input/output
  typedef elem_t [15:0] qtable_t;        // entry (4*a + b) holds a*b

  localparam int unsigned QS_LAYERS = 4; // minimum number of rounds

  typedef elem_t [QS_LAYERS-1:0] leaders_t; // entry i is the leader of layer i

  // Non-linear quasigroup of the sample: rows a = 0..3, columns b = 0..3
  //   0 2 1 3 / 2 1 3 0 / 1 3 0 2 / 3 0 2 1
  localparam qtable_t QG_EX1 = {
    2'd1, 2'd2, 2'd0, 2'd3,   // a=3: b=3..0
    2'd2, 2'd0, 2'd3, 2'd1,   // a=2
    2'd0, 2'd3, 2'd1, 2'd2,   // a=1
    2'd3, 2'd1, 2'd2, 2'd0    // a=0
  };

  // Leaders l1 = 1 (layers 0 and 2) and l2 = 3 (layers 1 and 3)
  localparam leaders_t LEADERS_EX1 = {2'd3, 2'd1, 2'd3, 2'd1};

  // Resulting sample Q-S-box, entry x holds S(x):
  //   E 6 C B 0 1 8 2 D 3 A F 9 5 4 7
  localparam logic [63:0] QSBOX_EX1 = 64'h7459_FA3D_2810_BC6E;

  // Reference quasigroup operation on a table (for testbenches and models)
  function automatic elem_t qmul(input qtable_t t, input elem_t a, input elem_t b);
    return t[{a, b}];
  endfunction

endpackage
