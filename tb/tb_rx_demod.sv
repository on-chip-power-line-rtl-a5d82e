// tb_rx_demod: drives rx_demod with synthetic symbol windows. In each window
// of 1100 samples the line agrees with the reference on a chosen number of
// samples (from 560 to 1100 for d = 1, from 0 to 540 for d = 0). After NSYM
// windows the decoded packet must equal the chosen decisions mapped with
// b0 = lvl0 ^ case_b, for all four lvl0/case_b combinations, and `start`
// must clear a partly received packet.
`timescale 1ns/1ps
module tb_rx_demod;
  localparam int NSYM = 51, WIN = 1100;
  logic clk = 0, rst_n = 0;
  logic sig = 0, ref_i = 0, active = 0, start = 0, sym_end = 0, done = 0, lvl0 = 0, case_b = 0;
  logic [NSYM-1:0] pkt;
  logic pkt_valid, dbit, dvalid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  rx_demod dut (.clk, .rst_n, .sig, .ref_i, .active, .start, .sym_end, .done,
                .lvl0, .case_b, .pkt, .pkt_valid, .dbit, .dvalid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic window(input logic d, input bit last);
    int agree;
    agree = d ? 560 + ($urandom % 541) : ($urandom % 541);
    for (int i = 0; i < WIN; i++) begin
      @(negedge clk);
      ref_i = $urandom;
      sig = (i < agree) ? ref_i : ~ref_i;
      sym_end = (i == WIN - 1);
      done = last && sym_end;
    end
  endtask

  task automatic packet(input logic [NSYM-1:0] d, input logic l0, input logic cb);
    logic b0;
    lvl0 = l0; case_b = cb; b0 = l0 ^ cb;
    @(negedge clk) start = 1; active = 0;
    @(negedge clk) start = 0; active = 1;
    for (int k = 0; k < NSYM; k++) window(d[k], k == NSYM - 1);
    @(negedge clk) sym_end = 0; done = 0; active = 0;
    check(pkt == (b0 ? d : ~d), $sformatf("lvl0=%0d case_b=%0d pkt %h d %h", l0, cb, pkt, d));
  endtask

  int nvalid = 0;
  always @(posedge clk) if (rst_n && pkt_valid) nvalid++;

  initial begin
    logic [NSYM-1:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      d = {19'($urandom), $urandom};
      packet(d, m[0], m[1]);
    end
    repeat (2) @(posedge clk);
    check(nvalid == 4, $sformatf("one pkt_valid per packet: %0d", nvalid));
    // start in the middle of a packet restarts it
    @(negedge clk) start = 1; active = 0;
    @(negedge clk) start = 0; active = 1;
    for (int k = 0; k < 5; k++) window(1'b0, 0);
    d = {19'($urandom), $urandom};
    packet(d, 1'b1, 1'b0);
    repeat (2) @(posedge clk);
    check(nvalid == 5, "restart gives one packet");
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
