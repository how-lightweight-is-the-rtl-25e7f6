// End-to-end test of the top level at its default parameters (31 rounds).
// The cipher and the three standalone Q-S-box forms run at the same time:
//   - the cipher encrypts corner-case and random blocks, each compared with
//     the behavioural PRESENT-80 reference using the sample Q-S-box;
//   - the unrolled, multi-round and serialized Q-S-boxes each substitute all
//     16 inputs, compared with the sample S-box table;
//   - the latency of every unit is checked (cipher 125, multi-round 3,
//     serialized 8 edges from the start edge to done).
// Each mechanism is counted and must occur at least once: left-to-right and
// right-to-left layer cycles in the cipher, round-key addition cycles, the
// final key addition, starts ignored while busy, and a reset that aborts an
// encryption.
module tb_present_q_top;
  import qsbox_pkg::*;
  import qref_pkg::*;

  localparam int ENC_LAT = 31 * QS_LAYERS + 1;

  int checks = 0, failures = 0;
  int n_enc = 0, n_comb = 0, n_iter = 0, n_ser = 0;
  int n_ltr = 0, n_rtl = 0, n_addkey = 0, n_final = 0, n_ignored = 0, n_abort = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        enc_start = 1'b0, enc_busy, enc_done;
  logic [63:0] enc_pt = '0, enc_ct;
  logic [79:0] enc_key = '0;
  nibble_t     comb_x = '0, comb_y;
  logic        iter_start = 1'b0, iter_busy, iter_done;
  nibble_t     iter_din = '0, iter_dout;
  logic        ser_start = 1'b0, ser_busy, ser_done;
  nibble_t     ser_din = '0, ser_dout;

  present_q_top dut (
    .clk, .rst_n,
    .enc_start, .enc_plaintext(enc_pt), .enc_key, .enc_busy, .enc_done, .enc_ciphertext(enc_ct),
    .comb_x, .comb_y,
    .iter_start, .iter_din, .iter_busy, .iter_done, .iter_dout,
    .ser_start, .ser_din, .ser_busy, .ser_done, .ser_dout
  );

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Observe the cipher's layer cycles: the phase selects leader and direction
  always @(posedge clk) begin
    if (rst_n && enc_busy) begin
      if (dut.u_cipher.final_q) n_final++;
      else if (dut.u_cipher.phase_q[0]) n_rtl++;
      else begin
        n_ltr++;
        if (dut.u_cipher.phase_q == '0) n_addkey++;
      end
    end
  end

  task automatic encrypt(input logic [63:0] p, input logic [79:0] k);
    logic [63:0] exp;
    int lat;
    exp = present_enc(p, k, SBOX_T1, 31);
    @(negedge clk);
    enc_pt = p;
    enc_key = k;
    enc_start = 1'b1;
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    enc_start = 1'b0;
    enc_pt = '0;
    enc_key = '0;
    while (!enc_done && lat < 400) begin
      enc_start = (lat == 7);
      if (enc_start) n_ignored++;
      @(posedge clk);
      lat++;
      @(negedge clk);
      enc_start = 1'b0;
    end
    check(enc_ct == exp, $sformatf("E(%h, %h) = %h, expected %h", p, k, enc_ct, exp));
    check(lat == ENC_LAT, $sformatf("cipher latency %0d", lat));
    n_enc++;
  endtask

  task automatic sub_seq(input bit serial, input int nsub, input int latency);
    for (int v = 0; v < nsub; v++) begin
      int lat;
      nibble_t res;
      @(negedge clk);
      if (serial) begin ser_din = nibble_t'(v); ser_start = 1'b1; end
      else        begin iter_din = nibble_t'(v); iter_start = 1'b1; end
      @(posedge clk);
      lat = 0;
      @(negedge clk);
      if (serial) ser_start = 1'b0; else iter_start = 1'b0;
      while (!(serial ? ser_done : iter_done) && lat < 50) begin
        if (lat == 1) begin
          if (serial) ser_start = 1'b1; else iter_start = 1'b1;
          n_ignored++;
        end
        @(posedge clk);
        lat++;
        @(negedge clk);
        if (serial) ser_start = 1'b0; else iter_start = 1'b0;
      end
      res = serial ? ser_dout : iter_dout;
      check(int'(res) == SBOX_T1[v], $sformatf("%s S(%h) = %h", serial ? "serial" : "iter", v, res));
      check(lat == latency, $sformatf("%s latency %0d", serial ? "serial" : "iter", lat));
      if (serial) n_ser++; else n_iter++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    fork
      begin
        encrypt(64'h0, 80'h0);
        encrypt({64{1'b1}}, {80{1'b1}});
        encrypt(64'h0123_4567_89AB_CDEF, 80'h0011_2233_4455_6677_8899);
        for (int i = 0; i < 4; i++)
          encrypt({$urandom, $urandom}, {16'($urandom), $urandom, $urandom});
      end
      sub_seq(1'b0, 16, 3);
      sub_seq(1'b1, 16, 8);
      for (int v = 0; v < 16; v++) begin
        @(negedge clk);
        comb_x = nibble_t'(v);
        #1;
        check(int'(comb_y) == SBOX_T1[v], $sformatf("comb S(%h) = %h", v, comb_y));
        n_comb++;
      end
    join

    // a reset in the middle of an encryption aborts it
    @(negedge clk);
    enc_pt = 64'hDEAD_BEEF_0000_1111;
    enc_key = 80'h1;
    enc_start = 1'b1;
    @(negedge clk);
    enc_start = 1'b0;
    repeat (30) @(negedge clk);
    check(enc_busy, "cipher not busy mid-encryption");
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    check(!enc_busy && enc_ct == '0, "reset did not abort the encryption");
    n_abort++;
    encrypt(64'hFEDC_BA98_7654_3210, 80'hA5A5_5A5A_0F0F_F0F0_1234);

    $display("counts: enc=%0d comb=%0d iter=%0d serial=%0d ltr=%0d rtl=%0d addkey=%0d final=%0d ignored=%0d abort=%0d",
             n_enc, n_comb, n_iter, n_ser, n_ltr, n_rtl, n_addkey, n_final, n_ignored, n_abort);
    check(n_enc > 0, "no encryption");
    check(n_comb > 0, "no unrolled lookup");
    check(n_iter > 0, "no multi-round substitution");
    check(n_ser > 0, "no serialized substitution");
    check(n_ltr > 0 && n_rtl > 0, "a layer direction never used");
    check(n_addkey > 0, "no round-key addition");
    check(n_final > 0, "no final key addition");
    check(n_ignored > 0, "no start while busy");
    check(n_abort > 0, "no aborted encryption");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
