// Exhaustive test of one e-transformation layer: every 4-bit string, every
// leader and both directions against the reference model; also checks that
// every layer is a bijection of the 16 strings.
module tb_q_layer;
  import qsbox_pkg::*;
  import qref_pkg::*;

  int checks = 0, failures = 0;
  nibble_t x, y;
  elem_t   leader;
  logic    rtl;

  q_layer dut (.x(x), .leader(leader), .rtl(rtl), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 2; d++) begin
      for (int l = 0; l < 4; l++) begin
        int unsigned seen = 0;
        for (int v = 0; v < 16; v++) begin
          int unsigned exp;
          x = nibble_t'(v);
          leader = elem_t'(l);
          rtl = d[0];
          #1;
          exp = q_layer_ref(v, l, d[0]);
          checks++;
          if (int'(y) != exp) begin
            failures++;
            $display("FAIL x=%h leader=%0d rtl=%0d: y=%h expected %h", v, l, d, y, exp);
          end
          seen |= 1 << y;
        end
        checks++;
        if (seen != 'hFFFF) begin
          failures++;
          $display("FAIL layer leader=%0d rtl=%0d is not a bijection", l, d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
