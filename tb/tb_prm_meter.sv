// tb_prm_meter: drives square pulse trains of known rate into prm_meter and
// checks the count of every completed window, the one-cycle `valid` pulse,
// the window length and saturation at the 10-bit maximum.
`timescale 1ns/1ps
module tb_prm_meter;
  localparam int unsigned W = 10, WIN = 2000;
  logic clk = 0, rst_n = 0, prm = 0;
  logic [W-1:0] value;
  logic valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  prm_meter dut (.clk, .rst_n, .prm, .value, .valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // pulse generator: one rising edge every `per` cycles (0: none)
  int per = 0, ph = 0;
  always @(posedge clk) begin
    if (per == 0) prm <= 0;
    else begin
      ph  <= (ph >= per - 1) ? 0 : ph + 1;
      prm <= (ph < per / 2);
    end
  end

  // window length: cycles between valid pulses
  int last_v = -1, cyc = 0, bad_len = 0, nvalid = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && valid) begin
      if (last_v >= 0 && cyc - last_v != WIN) begin bad_len++; $display("len %0d at %0d", cyc - last_v, cyc); end
      last_v = cyc;
      nvalid++;
    end
  end

  task automatic run_rate(input int p, input int exp_count);
    per = p;
    // skip two windows so that a whole window sees the new rate
    repeat (3) @(posedge clk iff valid);
    check(value == W'(exp_count), $sformatf("rate 1/%0d: got %0d expected %0d", p, value, exp_count));
    @(posedge clk iff valid);
    check(value == W'(exp_count), $sformatf("rate 1/%0d again: got %0d", p, value));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_rate(0, 0);
    run_rate(10, 200);
    run_rate(16, 125);
    run_rate(4, 500);
    run_rate(2, 1000);
    check(bad_len == 0 && nvalid > 10, "window is 2000 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
