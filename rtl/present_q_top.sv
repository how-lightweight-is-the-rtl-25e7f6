// Top level: the Q-S-box PRESENT-80 cipher next to the three standalone
// forms of the Q-S-box.
//
//   u_cipher  round-based PRESENT-80 whose S-layer is 16 multi-round
//             Q-S-boxes; with the default LAYERS_PER_CYCLE = 1, 4 cycles per
//             round (125 cycles per block); with 2, 2 cycles (63 per block)
//   u_comb    fully unrolled 4-layer Q-S-box, combinational lookup
//   u_iter    LAYERS_PER_CYCLE layers reused until all 4 are applied (4
//             cycles per substitution by default)
//   u_serial  one 4x2 lookup table, 8 cycles per substitution
// All four share the quasigroup QG and the leaders LEADERS, so they compute
// the same S-box. Each block's ports are brought out unchanged; see the
// blocks for the handshakes. Placing the standalone S-box forms beside the
// cipher is this design's choice, so that each can be used and measured.
module present_q_top
  import qsbox_pkg::*;
#(
  parameter qtable_t     QG      = QG_EX1,
  parameter leaders_t    LEADERS = LEADERS_EX1,
  parameter int unsigned ROUNDS  = 31,
  parameter int unsigned LAYERS_PER_CYCLE = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // cipher
  input  logic        enc_start,
  input  logic [63:0] enc_plaintext,
  input  logic [79:0] enc_key,
  output logic        enc_busy,
  output logic        enc_done,
  output logic [63:0] enc_ciphertext,
  // unrolled S-box
  input  nibble_t     comb_x,
  output nibble_t     comb_y,
  // multi-round S-box
  input  logic        iter_start,
  input  nibble_t     iter_din,
  output logic        iter_busy,
  output logic        iter_done,
  output nibble_t     iter_dout,
  // serial S-box
  input  logic        ser_start,
  input  nibble_t     ser_din,
  output logic        ser_busy,
  output logic        ser_done,
  output nibble_t     ser_dout
);

  present_q_cipher #(
    .QG(QG), .LEADERS(LEADERS), .ROUNDS(ROUNDS), .LAYERS_PER_CYCLE(LAYERS_PER_CYCLE)
  ) u_cipher (
    .clk, .rst_n,
    .start(enc_start), .plaintext(enc_plaintext), .key(enc_key),
    .busy(enc_busy), .done(enc_done), .ciphertext(enc_ciphertext)
  );

  qsbox_comb #(.QG(QG), .LEADERS(LEADERS)) u_comb (.x(comb_x), .y(comb_y));

  qsbox_iter #(.QG(QG), .LEADERS(LEADERS), .LAYERS_PER_CYCLE(LAYERS_PER_CYCLE)) u_iter (
    .clk, .rst_n,
    .start(iter_start), .din(iter_din),
    .busy(iter_busy), .done(iter_done), .dout(iter_dout)
  );

  qsbox_serial #(.QG(QG), .LEADERS(LEADERS)) u_serial (
    .clk, .rst_n,
    .start(ser_start), .din(ser_din),
    .busy(ser_busy), .done(ser_done), .dout(ser_dout)
  );

endmodule
