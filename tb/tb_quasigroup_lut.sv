// Exhaustive test of the 4x2 quasigroup lookup table: all 16 operand pairs
// against the sample quasigroup, plus the Latin-square property (every row
// and every column holds each element once).
module tb_quasigroup_lut;
  import qsbox_pkg::*;
  import qref_pkg::*;

  int checks = 0, failures = 0;
  elem_t a, b, y;

  quasigroup_lut dut (.a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned row_seen [4], col_seen [4];
    row_seen = '{default: 0};
    col_seen = '{default: 0};
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = elem_t'(i);
        b = elem_t'(j);
        #1;
        checks++;
        if (int'(y) != QG_REF[i][j]) begin
          failures++;
          $display("FAIL %0d*%0d = %0d, expected %0d", i, j, y, QG_REF[i][j]);
        end
        row_seen[i] |= 1 << y;
        col_seen[j] |= 1 << y;
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (row_seen[i] != 4'hF || col_seen[i] != 4'hF) begin
        failures++;
        $display("FAIL row/column %0d is not a permutation", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
