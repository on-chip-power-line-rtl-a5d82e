// tb_uplink_ctrl: checks halt after reset, Wake falling edge to run, that
// Sync falling edges and timeslot pulses start a packet only in run and only
// when no packet is being sent, and that each extra Wake gives one
// `wake_pulse`.
`timescale 1ns/1ps
module tb_uplink_ctrl;
  logic clk = 0, rst_n = 0, wake_n = 1, sync_n = 1, slot_sync = 0, tx_busy = 0;
  logic run, wake_pulse, tx_start, sync_dbg;
  int checks = 0, failures = 0, nstart = 0, nwake = 0;
  always #5 clk = ~clk;

  uplink_ctrl dut (.clk, .rst_n, .wake_n, .sync_n, .slot_sync, .tx_busy,
                   .run, .wake_pulse, .tx_start, .sync_dbg);

  always @(posedge clk) if (rst_n) begin
    if (tx_start) nstart++;
    if (wake_pulse) nwake++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 0;
    repeat (5) @(negedge clk);
    s = 1;
    repeat (10) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(!run, "halt after reset");
    pulse(sync_n);
    @(negedge clk) slot_sync = 1;
    @(negedge clk) slot_sync = 0;
    check(nstart == 0, "no start while halted");
    pulse(wake_n);
    check(run && nwake == 1, "wake enters run");
    pulse(sync_n);
    check(nstart == 1, "sync falling edge starts a packet");
    // rising edge alone does nothing: hold low then release
    @(negedge clk) slot_sync = 1;
    @(negedge clk) slot_sync = 0;
    check(nstart == 2, "timeslot pulse starts a packet");
    tx_busy = 1;
    pulse(sync_n);
    @(negedge clk) slot_sync = 1;
    @(negedge clk) slot_sync = 0;
    check(nstart == 2, "no start while busy");
    tx_busy = 0;
    pulse(wake_n);
    check(run && nwake == 2 && nstart == 2, "second wake only pulses");
    // a sync pulse of a single cycle is still seen
    @(negedge clk) sync_n = 0;
    @(negedge clk) sync_n = 1;
    repeat (5) @(negedge clk);
    check(nstart == 3, "short sync pulse");
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!run, "RST returns to halt");
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
