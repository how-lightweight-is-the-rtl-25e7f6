// Test of the Q-S-box PRESENT-80 cipher.
// The behavioural reference present_enc is first checked against the four
// published PRESENT-80 test vectors with the original PRESENT S-box. The
// same reference, with the sample Q-S-box in place of the PRESENT S-box,
// then gives the expected ciphertexts for the cipher under test: corner
// cases and random plaintext/key pairs. The latency (125 clock edges from the
// start edge to done) and the one-cycle done pulse are checked as well, and
// a start while busy must not disturb the running encryption.
module tb_present_q_cipher;
  import qsbox_pkg::*;
  import qref_pkg::*;

  localparam int ROUNDS  = 31;
  localparam int LATENCY = ROUNDS * QS_LAYERS + 1;

  int checks = 0, failures = 0;
  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [63:0] pt = '0, ct;
  logic [79:0] key = '0;
  logic        busy, done;

  present_q_cipher dut (
    .clk, .rst_n, .start, .plaintext(pt), .key, .busy, .done, .ciphertext(ct)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic encrypt(input logic [63:0] p, input logic [79:0] k, input bit poke);
    logic [63:0] exp;
    int lat;
    exp = present_enc(p, k, SBOX_T1, ROUNDS);
    @(negedge clk);
    pt = p;
    key = k;
    start = 1'b1;
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    start = 1'b0;
    pt = ~p;
    key = ~k;
    while (!done && lat < 400) begin
      start = poke && (lat == 40);
      @(posedge clk);
      lat++;
      @(negedge clk);
      start = 1'b0;
    end
    check(ct == exp, $sformatf("E(%h, %h) = %h, expected %h", p, k, ct, exp));
    check(lat == LATENCY, $sformatf("latency %0d, expected %0d", lat, LATENCY));
    @(negedge clk);
    check(!done && !busy, "done longer than one cycle");
  endtask

  initial begin
    // published PRESENT-80 vectors validate the reference model
    check(present_enc(64'h0, 80'h0, SBOX_PRESENT, 31) == 64'h5579C1387B228445, "model vector 1");
    check(present_enc(64'h0, {80{1'b1}}, SBOX_PRESENT, 31) == 64'hE72C46C0F5945049, "model vector 2");
    check(present_enc({64{1'b1}}, 80'h0, SBOX_PRESENT, 31) == 64'hA112FFC72F68417B, "model vector 3");
    check(present_enc({64{1'b1}}, {80{1'b1}}, SBOX_PRESENT, 31) == 64'h3333DCD3213210D2, "model vector 4");

    repeat (3) @(posedge clk);
    @(negedge clk);
    check(!busy, "busy during reset");
    rst_n = 1'b1;
    encrypt(64'h0, 80'h0, 1'b0);
    encrypt(64'h0, {80{1'b1}}, 1'b0);
    encrypt({64{1'b1}}, 80'h0, 1'b1);
    encrypt({64{1'b1}}, {80{1'b1}}, 1'b0);
    for (int i = 0; i < 12; i++)
      encrypt({$urandom, $urandom}, {16'($urandom), $urandom, $urandom}, bit'(i % 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
