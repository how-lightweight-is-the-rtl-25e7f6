// Exhaustive test of the unrolled Q-S-box against the sample S-box
// table, and against the layer-by-layer reference model.
module tb_qsbox_comb;
  import qsbox_pkg::*;
  import qref_pkg::*;

  int checks = 0, failures = 0;
  nibble_t x, y;

  qsbox_comb dut (.x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      x = nibble_t'(v);
      #1;
      checks += 2;
      if (int'(y) != SBOX_T1[v]) begin
        failures++;
        $display("FAIL S(%h) = %h, table gives %h", v, y, SBOX_T1[v]);
      end
      if (int'(y) != q_sbox_ref(v)) begin
        failures++;
        $display("FAIL S(%h) = %h, model gives %h", v, y, q_sbox_ref(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
