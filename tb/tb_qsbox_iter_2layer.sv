// Test of the multi-round Q-S-box with two layers per cycle (two steps).
// Every input 0..F is substituted and compared with the sample
// S-box; the number of clock edges from the start edge to the rise of done
// is checked (1); a start while busy must be ignored; busy must be low
// after reset; a reset in the middle of a substitution must abort it.
module tb_qsbox_iter_2layer;
  import qsbox_pkg::*;
  import qref_pkg::*;

  localparam int LATENCY = 1;

  int checks = 0, failures = 0;
  logic    clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  nibble_t din = '0, dout;
  logic    busy, done;

  qsbox_iter #(.LAYERS_PER_CYCLE(2)) dut (.clk, .rst_n, .start, .din, .busy, .done, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  // Start one substitution and return the result and the measured latency
  task automatic run(input nibble_t v, input bit poke_busy, output nibble_t res, output int lat);
    @(negedge clk);
    din   = v;
    start = 1'b1;
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    start = 1'b0;
    din   = ~v;
    while (!done) begin
      // a second start while busy must change nothing
      start = poke_busy;
      @(posedge clk);
      lat++;
      @(negedge clk);
      start = 1'b0;
      if (lat > 50) break;
    end
    res = dout;
  endtask

  initial begin
    nibble_t res;
    int lat;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(!busy && !done, "busy or done high during reset");
    rst_n = 1'b1;
    for (int v = 0; v < 16; v++) begin
      run(nibble_t'(v), bit'(v % 2), res, lat);
      check(int'(res) == SBOX_T1[v], $sformatf("S(%h) = %h, expected %h", v, res, SBOX_T1[v]));
      check(lat == LATENCY, $sformatf("latency %0d, expected %0d", lat, LATENCY));
      @(negedge clk);
      check(!done && !busy, "done longer than one cycle or still busy");
    end
    // reset in the middle of a substitution
    @(negedge clk);
    din = 4'h5;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy, "not busy after start");
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    check(!busy && dout == 4'h0, "reset did not abort the substitution");
    repeat (LATENCY + 2) begin
      @(negedge clk);
      check(!done, "done after an aborted substitution");
    end
    // one more full substitution after the abort
    run(4'hB, 1'b0, res, lat);
    check(int'(res) == SBOX_T1[11], "S(B) after abort");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
