// tb_timeslot_counter: checks that the first Sync comes (id-1)*SLOT_TICKS+1
// cycles after Wake (the output is registered; ID 0 counts as ID 1), later ones every FRAME_TICKS cycles, that a new Wake restarts
// the count and that the counter holds while disabled. Slot and frame are
// shortened (100 and 5000 cycles) to keep the run short.
`timescale 1ns/1ps
module tb_timeslot_counter;
  localparam int SLOT = 100, FRAME = 5000;
  logic clk = 0, rst_n = 0, en = 0, wake = 0, sync;
  logic [9:0] id = 0;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  timeslot_counter #(.SLOT_TICKS(SLOT), .FRAME_TICKS(FRAME)) dut (.clk, .rst_n, .en, .wake, .id, .sync);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_wake;
    @(negedge clk) wake = 1;
    @(negedge clk) wake = 0;
  endtask

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1; en = 1;
    repeat (200) @(posedge clk);
    check(!sync, "no sync before wake");
    for (int k = 0; k < 3; k++) begin
      id = (k == 0) ? 10'd0 : (k == 1) ? 10'd8 : 10'd34;
      do_wake; t0 = cyc;
      @(posedge clk iff sync); t1 = cyc;
      check(t1 - t0 == ((id == 0) ? 0 : (id - 1)) * SLOT + 1, $sformatf("id %0d first sync after %0d", id, t1 - t0));
      @(posedge clk iff sync);
      check(cyc - t1 == FRAME, $sformatf("frame %0d", cyc - t1));
    end
    // a Wake in the middle restarts the slot
    id = 10'd20;
    do_wake;
    repeat (500) @(posedge clk);
    do_wake; t0 = cyc;
    @(posedge clk iff sync);
    check(cyc - t0 == 19 * SLOT + 1, "wake restarts the slot counter");
    // hold while disabled
    do_wake; t0 = cyc;
    repeat (50) @(posedge clk);
    en = 0;
    repeat (300) @(posedge clk);
    en = 1;
    @(posedge clk iff sync);
    check(cyc - t0 == 19 * SLOT + 301, $sformatf("hold while disabled %0d", cyc - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
