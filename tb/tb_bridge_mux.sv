// tb_bridge_mux: applies every combination of run, tx_busy, carrier and
// power level and checks the registered bridge state and switch pattern
// (+: S1 S4, -: S2 S3, short: S2 S4) one cycle later.
`timescale 1ns/1ps
module tb_bridge_mux;
  import plc_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, tx_busy = 0, carrier = 0;
  bridge_t power_level = BR_ZERO, state;
  logic s1, s2, s3, s4;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bridge_mux dut (.clk, .rst_n, .run, .tx_busy, .carrier, .power_level, .state,
                  .s1, .s2, .s3, .s4);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bridge_t exp_s;
    logic [3:0] exp_sw;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++)
      for (int i = 0; i < 24; i++) begin
        @(negedge clk);
        run = i[0]; tx_busy = i[1]; carrier = i[2];
        power_level = bridge_t'(i / 8);
        exp_s = !run ? BR_ZERO : tx_busy ? (carrier ? BR_POS : BR_NEG) : power_level;
        exp_sw = (exp_s == BR_POS) ? 4'b1001 : (exp_s == BR_NEG) ? 4'b0110 : 4'b0101;
        @(negedge clk);
        check(state == exp_s && {s1, s2, s3, s4} == exp_sw,
              $sformatf("run=%0d busy=%0d car=%0d pwr=%0d -> %0d %b", run, tx_busy, carrier,
                        power_level, state, {s1, s2, s3, s4}));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
