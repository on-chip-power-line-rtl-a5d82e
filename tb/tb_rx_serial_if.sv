// tb_rx_serial_if: plays random packets through rx_serial_if and checks the
// 3-wire link (one PACK+STRT pulse, then one BIT_IS_ONE or BIT_IS_ZERO pulse
// per bit, in order, 1000 cycles apart, 100 cycles wide), the 1-wire link
// (wavelet toggle counts and the bit level in mid-slot) and that a packet
// arriving during play-out is dropped and flagged.
`timescale 1ns/1ps
module tb_rx_serial_if;
  localparam int NB = 51, BT = 1000;
  logic clk = 0, rst_n = 0, pkt_valid = 0;
  logic [NB-1:0] pkt = '0;
  logic pack_strt, bit_one, bit_zero, one_wire, busy, dropped;
  int checks = 0, failures = 0, cyc = 0, ndrop = 0;
  always #5 clk = ~clk;
  always @(posedge clk) begin cyc++; if (rst_n && dropped) ndrop++; end

  rx_serial_if dut (.clk, .rst_n, .pkt, .pkt_valid, .pack_strt, .bit_one, .bit_zero,
                    .one_wire, .busy, .dropped);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // count 1-wire toggles over the first n cycles from now
  task automatic toggles(input int n, output int tg);
    logic prev;
    tg = 0; prev = one_wire;
    repeat (n) begin @(posedge clk); if (one_wire != prev) tg++; prev = one_wire; end
  endtask

  task automatic play(input logic [NB-1:0] p, input bit inject);
    int t0, tg, w;
    @(negedge clk) begin pkt = p; pkt_valid = 1; end
    @(negedge clk) pkt_valid = 0;
    @(posedge clk iff pack_strt); t0 = cyc;
    check(!bit_one && !bit_zero, "only PACK+STRT");
    toggles(99, tg);
    check(tg == 19, $sformatf("packet wavelet toggles %0d", tg));
    w = 99;
    while (pack_strt) begin @(posedge clk); w++; end
    check(w == 100, $sformatf("pulse width %0d", w));
    if (inject) begin
      @(negedge clk) begin pkt = ~p; pkt_valid = 1; end
      @(negedge clk) pkt_valid = 0;
    end
    for (int k = 0; k < NB; k++) begin
      @(posedge clk iff (bit_one || bit_zero));
      check(cyc - t0 == (k + 1) * BT, $sformatf("slot %0d at %0d", k, cyc - t0));
      check(bit_one == p[k] && bit_zero == !p[k], $sformatf("bit %0d on 3 wires", k));
      toggles(100, tg);
      check(tg == (p[k] ? 10 : 9), $sformatf("bit wavelet toggles %0d", tg));
      repeat (400) @(posedge clk);
      check(one_wire == p[k], "1-wire level");
    end
    @(posedge clk iff !busy);
    check(cyc - t0 <= (NB + 1) * BT + 2, "play-out length");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(!pack_strt && !bit_one && !bit_zero && !one_wire && !busy, "quiet after reset");
    play({19'($urandom), $urandom}, 0);
    play({19'($urandom), $urandom}, 1);
    check(ndrop == 1, "packet during play-out dropped");
    repeat (2000) @(posedge clk);
    check(!busy, "no second play-out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
