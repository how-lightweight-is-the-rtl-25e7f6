// Multi-round Q-S-box: LAYERS_PER_CYCLE chained e-transformation layers
// reused over a 4-bit register until all QS_LAYERS (4) layers are applied.
//
// With the default LAYERS_PER_CYCLE = 1 a single layer runs four times (four
// cycles per substitution); with 2, two layers run twice. A multiplexer feeds
// the layers with the new input on a start and with the register afterwards;
// a step counter selects the leader and the direction of each layer (layer k
// of the S-box runs left to right for even k, right to left for odd k). The
// substitution equals that of the unrolled Q-S-box. The register is the one a
// round-based cipher already has for its state.
//
// Interface and timing (the handshake is this design's own choice):
//   start  is taken when busy is low; din is sampled on that clock edge,
//          which also performs the first step.
//   busy   high while the remaining steps run.
//   done   one-cycle pulse rising on edge QS_LAYERS/LAYERS_PER_CYCLE - 1
//          after the start edge (3 by default); dout then holds S(din)
//          until the next start. A start while busy is ignored.
// Active-low synchronous reset clears the register and the counter.
module qsbox_iter
  import qsbox_pkg::*;
#(
  parameter qtable_t     QG               = QG_EX1,
  parameter leaders_t    LEADERS          = LEADERS_EX1,
  parameter int unsigned LAYERS_PER_CYCLE = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  nibble_t din,
  output logic    busy,
  output logic    done,
  output nibble_t dout
);

  localparam int unsigned STEPS = QS_LAYERS / LAYERS_PER_CYCLE;
  localparam int unsigned RW    = (STEPS > 1) ? $clog2(STEPS) : 1;

  if (STEPS < 2 || STEPS * LAYERS_PER_CYCLE != QS_LAYERS) begin : g_bad_lpc
    $error("LAYERS_PER_CYCLE must divide QS_LAYERS and leave at least two steps");
  end

  nibble_t        state_q;
  nibble_t        chain [LAYERS_PER_CYCLE+1];
  logic [RW-1:0]  step_q, step_sel;
  logic           busy_q, done_q;

  always_comb begin
    chain[0] = busy_q ? state_q : din;
    step_sel = busy_q ? step_q : '0;
  end

  for (genvar j = 0; j < LAYERS_PER_CYCLE; j++) begin : g_layer
    localparam int unsigned LW = $clog2(QS_LAYERS);
    logic [LW-1:0] idx;
    always_comb idx = LW'(step_sel * LAYERS_PER_CYCLE + j);
    q_layer #(.QG(QG)) u_layer (
      .x     (chain[j]),
      .leader(LEADERS[idx]),
      .rtl   (idx[0]),
      .y     (chain[j+1])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= '0;
      step_q  <= '0;
      busy_q  <= 1'b0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (busy_q) begin
        state_q <= chain[LAYERS_PER_CYCLE];
        step_q  <= step_q + 1'b1;
        if (step_q == RW'(STEPS - 1)) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end
      end else if (start) begin
        state_q <= chain[LAYERS_PER_CYCLE];
        step_q  <= RW'(1);
        busy_q  <= 1'b1;
      end
    end
  end

  assign busy = busy_q;
  assign done = done_q;
  assign dout = state_q;

endmodule
