// Serialized Q-S-box with a single 4x2 lookup table.
//
// The two 2-bit elements of the string sit in two registers. Each clock
// cycle the one lookup table performs one quasigroup operation and writes its
// result back over one element, so one e-transformation layer takes two
// cycles and the whole QS_LAYERS-layer (4) substitution takes eight, half
// the throughput of the single-layer multi-round Q-S-box. In step 0 of a
// layer the table computes leader * element; in step 1 it computes
// (element just written) * (other element). Even layers update the left
// element first, odd layers the right one. The step sequencing and the
// handshake are this design's own choices.
//
// Interface and timing:
//   start  taken when busy is low; din is loaded on that edge.
//   busy   high during the 8 operation cycles.
//   done   one-cycle pulse that rises on the eighth edge after the start
//          edge; dout then holds S(din) until the next start. A start while
//          busy is ignored.
// Active-low synchronous reset.
module qsbox_serial
  import qsbox_pkg::*;
#(
  parameter qtable_t  QG      = QG_EX1,
  parameter leaders_t LEADERS = LEADERS_EX1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  nibble_t din,
  output logic    busy,
  output logic    done,
  output nibble_t dout
);

  localparam int unsigned SW = $clog2(2 * QS_LAYERS);

  elem_t         left_q, right_q;
  logic [SW-1:0] step_q;          // {layer, step within layer}
  logic          busy_q, done_q;

  elem_t layer_leader, op_a, op_b, op_y;
  logic  step, to_right;

  always_comb begin
    step         = step_q[0];
    layer_leader = LEADERS[step_q[SW-1:1]];
    // even layer: left then right; odd layer: right then left
    to_right     = step_q[1] ^ step;
    op_a         = step ? (to_right ? left_q : right_q) : layer_leader;
    op_b         = to_right ? right_q : left_q;
  end

  quasigroup_lut #(.QG(QG)) u_lut (.a(op_a), .b(op_b), .y(op_y));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left_q  <= '0;
      right_q <= '0;
      step_q  <= '0;
      busy_q  <= 1'b0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (busy_q) begin
        if (to_right) right_q <= op_y;
        else          left_q  <= op_y;
        step_q <= step_q + 1'b1;
        if (step_q == SW'(2 * QS_LAYERS - 1)) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end
      end else if (start) begin
        left_q  <= din[3:2];
        right_q <= din[1:0];
        step_q  <= '0;
        busy_q  <= 1'b1;
      end
    end
  end

  assign busy = busy_q;
  assign done = done_q;
  assign dout = {left_q, right_q};

endmodule
