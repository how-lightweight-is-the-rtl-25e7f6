// Reference models for the Q-S-box testbenches, written independently of the
// RTL: plain integer arrays and loops instead of packed tables and lookup
// modules.
//   QG_REF      sample quasigroup, row a, column b holds a*b
//   SBOX_T1     sample Q-S-box S(x) for x = 0..F
//   SBOX_PRESENT original PRESENT S-box, used only to validate present_enc
//   q_layer_ref one e-transformation layer
//   q_sbox_ref  four layers, leaders 1,3,1,3, alternating direction
//   present_enc PRESENT-80 encryption with any 4-bit S-box in both the
//               S-layer and the key schedule
package qref_pkg;

  typedef int unsigned sbox_tab_t [16];

  localparam int unsigned QG_REF [4][4] = '{
    '{0, 2, 1, 3},
    '{2, 1, 3, 0},
    '{1, 3, 0, 2},
    '{3, 0, 2, 1}
  };

  localparam sbox_tab_t SBOX_T1 = '{
    'hE, 'h6, 'hC, 'hB, 'h0, 'h1, 'h8, 'h2,
    'hD, 'h3, 'hA, 'hF, 'h9, 'h5, 'h4, 'h7
  };

  localparam sbox_tab_t SBOX_PRESENT = '{
    'hC, 'h5, 'h6, 'hB, 'h9, 'h0, 'hA, 'hD,
    'h3, 'hE, 'hF, 'h8, 'h4, 'h7, 'h1, 'h2
  };

  function automatic int unsigned q_layer_ref(int unsigned x, int unsigned leader, bit rtl);
    int unsigned l, r;
    l = (x >> 2) & 3;
    r = x & 3;
    if (!rtl) begin
      l = QG_REF[leader][l];
      r = QG_REF[l][r];
    end else begin
      r = QG_REF[leader][r];
      l = QG_REF[r][l];
    end
    return (l << 2) | r;
  endfunction

  function automatic int unsigned q_sbox_ref(int unsigned x);
    int unsigned leaders [4] = '{1, 3, 1, 3};
    int unsigned v = x;
    for (int i = 0; i < 4; i++) v = q_layer_ref(v, leaders[i], bit'(i % 2));
    return v;
  endfunction

  function automatic logic [63:0] present_enc(logic [63:0] pt, logic [79:0] key,
                                              sbox_tab_t sb, int rounds);
    logic [63:0] s, t;
    logic [79:0] k;
    s = pt;
    k = key;
    for (int r = 1; r <= rounds; r++) begin
      s = s ^ k[79:16];
      for (int n = 0; n < 16; n++) s[4*n +: 4] = 4'(sb[s[4*n +: 4]]);
      t = '0;
      for (int i = 0; i < 64; i++) t[(i == 63) ? 63 : (i * 16) % 63] = s[i];
      s = t;
      k = {k[18:0], k[79:19]};
      k[79:76] = 4'(sb[k[79:76]]);
      k[19:15] = k[19:15] ^ 5'(r);
    end
    return s ^ k[79:16];
  endfunction

endpackage
