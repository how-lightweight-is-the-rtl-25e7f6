// Test of the shared package constants: the packed quasigroup table and the
// qmul helper against the reference square, the packed sample S-box against
// the sample S-box table, and the leader vector (1, 3, 1, 3).
module tb_qsbox_pkg;
  import qsbox_pkg::*;
  import qref_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        check(int'(qmul(QG_EX1, elem_t'(a), elem_t'(b))) == QG_REF[a][b],
              $sformatf("QG_EX1 %0d*%0d", a, b));
    for (int x = 0; x < 16; x++)
      check(int'(QSBOX_EX1[4*x +: 4]) == SBOX_T1[x], $sformatf("QSBOX_EX1[%h]", x));
    check(QS_LAYERS == 4, "QS_LAYERS");
    for (int i = 0; i < 4; i++)
      check(int'(LEADERS_EX1[i]) == ((i % 2 == 0) ? 1 : 3), $sformatf("leader %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
