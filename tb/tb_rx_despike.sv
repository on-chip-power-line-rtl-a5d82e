// tb_rx_despike: feeds rx_despike with clean level changes and with spikes
// of 1 and 2 cycles. Clean changes must appear on `sig` exactly LEN+3
// cycles later (two synchroniser stages, LEN history stages, output
// register) with one `edge_o` pulse; spikes must not appear at all.
`timescale 1ns/1ps
module tb_rx_despike;
  localparam int LEN = 3;
  logic clk = 0, rst_n = 0, din = 0, sig, edge_o;
  int checks = 0, failures = 0, cyc = 0, nedge = 0;
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && edge_o) nedge++;
  end

  rx_despike #(.LEN(LEN)) dut (.clk, .rst_n, .din, .sig, .edge_o);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input logic v);
    int t0, e0;
    logic old;
    old = sig; e0 = nedge;
    @(negedge clk) din = v; t0 = cyc;
    @(posedge clk iff sig != old);
    check(cyc - t0 == LEN + 3, $sformatf("latency %0d", cyc - t0));
    repeat (3) @(posedge clk);
    check(nedge == e0 + 1, "one edge pulse");
  endtask

  task automatic spike(input int w);
    logic old;
    int e0;
    old = sig; e0 = nedge;
    @(negedge clk) din = ~din;
    repeat (w - 1) @(negedge clk);
    @(negedge clk) din = ~din;
    repeat (LEN + 6) @(posedge clk);
    check(sig == old && nedge == e0, $sformatf("spike of %0d removed", w));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    check(sig == 0, "low after reset");
    for (int i = 0; i < 6; i++) begin
      step(1); spike(1); spike(2);
      step(0); spike(2); spike(1);
    end
    // a pulse of exactly LEN cycles passes
    begin
      automatic int e0 = nedge;
      @(negedge clk) din = 1;
      repeat (LEN - 1) @(negedge clk);
      @(negedge clk) din = 0;
      repeat (LEN + 8) @(posedge clk);
      check(nedge == e0 + 2, "LEN-cycle pulse passes");
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
