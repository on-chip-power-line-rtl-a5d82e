// tb_power_pulse_gen: runs power_pulse_gen at 50 Hz and 60 Hz for several
// IDs and checks the length of the positive and negative pulses and of the
// period against the firing-delay law d = id*(T/4) >> 10, and that the
// output is zero while disabled.
`timescale 1ns/1ps
module tb_power_pulse_gen;
  import plc_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, freq_sel = 0;
  logic [9:0] id = 0;
  bridge_t level;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  power_pulse_gen dut (.clk, .rst_n, .en, .freq_sel, .id, .level);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // count cycles at each level over exactly one period after the first
  // positive edge
  task automatic measure(input int T, input int idv);
    int npos = 0, nneg = 0, nzero = 0, d, half;
    half = T / 2;
    d = (idv * (T / 4)) >> 10;
    @(posedge clk iff level == BR_POS);
    for (int i = 0; i < T; i++) begin
      if (level == BR_POS) npos++;
      else if (level == BR_NEG) nneg++;
      else nzero++;
      @(posedge clk);
    end
    check(level == BR_POS, $sformatf("period %0d id %0d", T, idv));
    check(npos == half - 2 * d, $sformatf("T=%0d id=%0d pos %0d exp %0d", T, idv, npos, half - 2 * d));
    check(nneg == (T - d) - (half + d), $sformatf("T=%0d id=%0d neg %0d", T, idv, nneg));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (100) @(posedge clk);
    check(level == BR_ZERO, "zero while disabled");
    for (int k = 0; k < 4; k++) begin
      automatic int idv = (k == 0) ? 0 : (k == 1) ? 683 : (k == 2) ? 300 : 1000;
      id = 10'(idv);
      en = 0; freq_sel = 0;
      repeat (3) @(posedge clk);
      en = 1;
      measure(40000, idv);
      freq_sel = 1;
      repeat (40000) @(posedge clk);
      measure(33333, idv);
    end
    en = 0;
    repeat (3) @(posedge clk);
    check(level == BR_ZERO, "zero after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
