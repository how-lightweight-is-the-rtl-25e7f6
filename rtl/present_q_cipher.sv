// Round-based PRESENT-80 encryption with a multi-round Q-S-box S-layer.
//
// The cipher keeps the PRESENT structure: a 64-bit state, an 80-bit key
// register, 31 rounds of addRoundKey, S-layer and bit permutation, and a
// final key addition. The 16 parallel 4-bit S-boxes are replaced by 16
// multi-round Q-S-boxes of LAYERS_PER_CYCLE quasigroup e-transformation
// layers each, which reuse the state register: one PRESENT round takes
// STEPS = QS_LAYERS / LAYERS_PER_CYCLE cycles (4 with the default single
// layer). With one layer per cycle:
//   phase 0: state <= Q0(state ^ K[79:16])      key <= rotl61(key), Q0 on top nibble
//   phase 1: state <= Q1(state)                 top key nibble <= Q1(top nibble)
//   phase 2: state <= Q2(state)                 top key nibble <= Q2(top nibble)
//   phase 3: state <= P(Q3(state))              top key nibble <= Q3(top nibble),
//                                               key[19:15] ^= round counter
// Qk is layer k of the Q-S-box (leader LEADERS[k], left to right for even k,
// right to left for odd k); P moves bit i to bit 16*i mod 63 (bit 63 stays).
// With two layers per cycle, phase p applies layers 2p and 2p+1 in one cycle.
// After round 31 one more cycle adds the last round key.
// Running the key-schedule S-box through the same quasigroup layers, spread
// over the same phases, is this design's choice; so are the handshake and
// reset. The PRESENT round structure is the published PRESENT-80 one.
//
// Interface and timing:
//   start       taken when busy is low; plaintext and key are loaded on that edge.
//   busy        high for ROUNDS*STEPS + 1 cycles (125 at the defaults);
//               a start while busy is ignored.
//   done        one-cycle pulse that rises on the (ROUNDS*STEPS + 1)th edge
//               after the start edge; ciphertext then holds the result until
//               the next start.
// Active-low synchronous reset.
module present_q_cipher
  import qsbox_pkg::*;
#(
  parameter qtable_t     QG               = QG_EX1,
  parameter leaders_t    LEADERS          = LEADERS_EX1,
  parameter int unsigned ROUNDS           = 31,
  parameter int unsigned LAYERS_PER_CYCLE = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [63:0] plaintext,
  input  logic [79:0] key,
  output logic        busy,
  output logic        done,
  output logic [63:0] ciphertext
);

  localparam int unsigned STEPS = QS_LAYERS / LAYERS_PER_CYCLE;
  localparam int unsigned PW    = (STEPS > 1) ? $clog2(STEPS) : 1;
  localparam int unsigned LW    = $clog2(QS_LAYERS);

  if (STEPS < 2 || STEPS * LAYERS_PER_CYCLE != QS_LAYERS) begin : g_bad_lpc
    $error("LAYERS_PER_CYCLE must divide QS_LAYERS and leave at least two steps");
  end
  if (ROUNDS < 1 || ROUNDS > 31) begin : g_bad_rounds
    $error("ROUNDS must be 1..31 (5-bit round counter)");
  end

  logic [63:0]   state_q, sl_in, sl_out, perm_out;
  logic [79:0]   key_q, key_rot;
  logic [4:0]    round_q;
  logic [PW-1:0] phase_q;
  logic          busy_q, final_q, done_q;
  nibble_t       ks_in, ks_out;

  // Leader and direction of each layer position in this phase
  elem_t [LAYERS_PER_CYCLE-1:0] lead;
  logic  [LAYERS_PER_CYCLE-1:0] dir;

  for (genvar j = 0; j < LAYERS_PER_CYCLE; j++) begin : g_sel
    logic [LW-1:0] idx;
    always_comb begin
      idx     = LW'(phase_q * LAYERS_PER_CYCLE + j);
      lead[j] = LEADERS[idx];
      dir[j]  = idx[0];
    end
  end

  // S-layer: 16 Q-S-boxes of LAYERS_PER_CYCLE layers sharing leaders and directions
  always_comb sl_in = (phase_q == '0) ? (state_q ^ key_q[79:16]) : state_q;

  for (genvar n = 0; n < 16; n++) begin : g_sbox
    nibble_t chain [LAYERS_PER_CYCLE+1];
    assign chain[0] = sl_in[4*n +: 4];
    for (genvar j = 0; j < LAYERS_PER_CYCLE; j++) begin : g_layer
      q_layer #(.QG(QG)) u_q (
        .x(chain[j]), .leader(lead[j]), .rtl(dir[j]), .y(chain[j+1])
      );
    end
    assign sl_out[4*n +: 4] = chain[LAYERS_PER_CYCLE];
  end

  // PRESENT bit permutation
  always_comb begin
    for (int i = 0; i < 63; i++) perm_out[(16 * i) % 63] = sl_out[i];
    perm_out[63] = sl_out[63];
  end

  // Key schedule: rotation in phase 0, Q-S-box layers on the top nibble in every phase
  always_comb begin
    key_rot = {key_q[18:0], key_q[79:19]};
    ks_in   = (phase_q == '0) ? key_rot[79:76] : key_q[79:76];
  end

  nibble_t kchain [LAYERS_PER_CYCLE+1];
  assign kchain[0] = ks_in;
  for (genvar j = 0; j < LAYERS_PER_CYCLE; j++) begin : g_klayer
    q_layer #(.QG(QG)) u_qk (
      .x(kchain[j]), .leader(lead[j]), .rtl(dir[j]), .y(kchain[j+1])
    );
  end
  assign ks_out = kchain[LAYERS_PER_CYCLE];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= '0;
      key_q   <= '0;
      round_q <= '0;
      phase_q <= '0;
      busy_q  <= 1'b0;
      final_q <= 1'b0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (!busy_q) begin
        if (start) begin
          state_q <= plaintext;
          key_q   <= key;
          round_q <= 5'd1;
          phase_q <= '0;
          busy_q  <= 1'b1;
          final_q <= 1'b0;
        end
      end else if (final_q) begin
        state_q <= state_q ^ key_q[79:16];
        busy_q  <= 1'b0;
        final_q <= 1'b0;
        done_q  <= 1'b1;
      end else begin
        if (phase_q == PW'(STEPS - 1)) phase_q <= '0;
        else                           phase_q <= phase_q + 1'b1;
        if (phase_q == '0) begin
          state_q <= sl_out;
          key_q   <= {ks_out, key_rot[75:0]};
        end else if (phase_q == PW'(STEPS - 1)) begin
          state_q <= perm_out;
          key_q   <= {ks_out, key_q[75:20], key_q[19:15] ^ round_q, key_q[14:0]};
          round_q <= round_q + 5'd1;
          if (round_q == 5'(ROUNDS)) final_q <= 1'b1;
        end else begin
          state_q <= sl_out;
          key_q   <= {ks_out, key_q[75:0]};
        end
      end
    end
  end

  assign busy       = busy_q;
  assign done       = done_q;
  assign ciphertext = state_q;

endmodule
