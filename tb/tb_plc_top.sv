// tb_plc_top: end-to-end test of one power-line link at full size (no
// parameter overrides). The uplink module's S1 drive is wired to the
// receiver input, as in the prototype, and the receiver runs from its own
// clock 0.2% faster than the transmitter so that its PLL has to track.
//
// Sequence: reset (bridge shorted), Wake (50 Hz power wave, checked for
// period and firing-angle width), Sync-triggered packets with measured and
// fixed data, a packet triggered by the cell's own timeslot counter, 60 Hz,
// two back-to-back packets, and RST back to halt. Each packet is checked on
// the bridge (length 56100 cycles), at the receiver (all 51 bits against an
// independent CRC model) and on both serial links. The test also counts
// receiver candidate rejections (power-wave edges) and both cases of the
// carrier phase ambiguity, and fails if any mechanism never happened.
`timescale 1ns/1ps
module tb_plc_top;
  import plc_pkg::*;

  localparam int unsigned SYM_TICKS = 22 * 50;
  localparam int unsigned PKT_TICKS = 51 * SYM_TICKS;

  logic tx_clk = 0, rx_clk = 0;
  logic tx_rst_n = 0, rx_rst_n = 0;
  logic wake_n = 1, sync_n = 1, freq = 0, sn_fx = 0;
  logic [R_ID-1:0] id = 10'd683;
  logic v_prm = 0, c_prm = 0;
  logic s1, s2, s3, s4, sync_o, tx_busy;
  bridge_t bridge;
  logic [PKT_LEN-1:0] tx_packet, rx_packet;
  logic pack_strt, bit_one, bit_zero, one_wire, rx_valid, rx_abort, rx_case_b, rx_dropped, rx_locked, si_busy;

  always #250   tx_clk = ~tx_clk;   // 2 MHz
  always #249.5 rx_clk = ~rx_clk;   // 2 MHz + 0.2 %

  plc_top dut (
    .tx_clk, .tx_rst_n, .wake_n, .sync_n, .freq, .sn_fx, .id, .v_prm, .c_prm,
    .s1, .s2, .s3, .s4, .sync_o, .tx_busy, .bridge, .tx_packet,
    .rx_clk, .rx_rst_n, .rx_vs(s1), .pack_strt, .bit_one, .bit_zero, .one_wire,
    .rx_packet, .rx_valid, .rx_abort, .rx_locked, .rx_case_b, .si_busy, .rx_dropped
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Independent CRC: remainder of data * x^21 divided by x^21 + POLY.
  function automatic logic [PKT_LEN-1:0] model_packet(input logic [DATA_LEN-1:0] data);
    logic [PKT_LEN-1:0] r;
    r = {data, {CRC_LEN{1'b0}}};
    for (int i = PKT_LEN - 1; i >= CRC_LEN; i--)
      if (r[i]) r[i -: CRC_LEN+1] = r[i -: CRC_LEN+1] ^ {1'b1, 21'b101100101011101010001};
    return {data, r[CRC_LEN-1:0]};
  endfunction

  // PRM sensors: square waves synchronous to the chip clock, 200 and 125
  // rising edges per 2000-cycle window.
  int vdiv = 0, cdiv = 0;
  always @(posedge tx_clk) begin
    vdiv <= (vdiv == 4) ? 0 : vdiv + 1;
    cdiv <= (cdiv == 7) ? 0 : cdiv + 1;
    if (vdiv == 4) v_prm <= ~v_prm;
    if (cdiv == 7) c_prm <= ~c_prm;
  end

  // ---------------- monitors ----------------
  logic [PKT_LEN-1:0] expect_q[$];
  int n_rx = 0, n_caseA = 0, n_caseB = 0, n_abort = 0, n_sync = 0;
  int n_pack = 0, n_bits_si = 0, n_halt = 0;
  int bad_bridge = 0;

  always @(posedge rx_clk) if (rx_rst_n && rx_abort) n_abort++;
  always @(posedge tx_clk) if (tx_rst_n && sync_o) n_sync++;
  // the bridge state is registered: it follows tx_busy by one cycle
  logic busy_d = 0;
  int busy_len = 0, last_len = 0;
  always @(posedge tx_clk) begin
    busy_d <= tx_busy;
    if (tx_rst_n && tx_busy && busy_d && !(bridge == BR_POS || bridge == BR_NEG)) bad_bridge++;
    if (tx_busy) busy_len <= busy_len + 1;
    else if (busy_d) begin last_len <= busy_len; busy_len <= 0; end
  end

  logic [PKT_LEN-1:0] last_rx;
  always @(posedge rx_clk) begin
    if (rx_rst_n && rx_valid) begin
      logic [PKT_LEN-1:0] exp_p;
      n_rx++;
      $display("%0t rx packet %h case_b=%0d", $time, rx_packet, rx_case_b);
      if (rx_case_b) n_caseB++; else n_caseA++;
      last_rx = rx_packet;
      if (expect_q.size() == 0) check(0, "unexpected packet at receiver");
      else begin
        exp_p = expect_q.pop_front();
        check(rx_packet == exp_p, $sformatf("rx packet %h expected %h", rx_packet, exp_p));
      end
    end
  end

  // 3-wire link: collect bits of the packet being played out
  logic [PKT_LEN-1:0] si_bits, si_ref;
  int si_n = 0, si_pkts = 0;
  logic po, p1, p0;
  always @(posedge rx_clk) begin
    po <= pack_strt; p1 <= bit_one; p0 <= bit_zero;
    if (pack_strt && !po) begin
      n_pack++;
      si_n = 0;
      si_ref = last_rx;
    end
    if ((bit_one && !p1) || (bit_zero && !p0)) begin
      check(bit_one ^ bit_zero, "exactly one bit wire pulses");
      si_bits[si_n] = bit_one;
      si_n++;
      n_bits_si++;
      if (si_n == PKT_LEN) begin
        si_pkts++;
        check(si_bits == si_ref, "3-wire bits match decoded packet");
      end
    end
  end

  // 1-wire link: count toggles in the wavelet window after a slot start (20
  // half periods of 5 cycles ending low: 19; 10 of 10 cycles then the high
  // level of a 1 bit: 10) and
  // sample the level in the middle of each bit slot
  int ow_tog_pack = 0, ow_tog_bit = 0, ow_bad = 0;
  initial begin
    forever begin
      @(posedge rx_clk);
      if (pack_strt && !po) begin
        automatic int tg = 0; automatic logic prev = one_wire;
        repeat (120) begin @(posedge rx_clk); if (one_wire != prev) tg++; prev = one_wire; end
        ow_tog_pack = tg;
      end else if (bit_one && !p1) begin
        automatic int tg = 0; automatic logic prev = one_wire;
        repeat (120) begin @(posedge rx_clk); if (one_wire != prev) tg++; prev = one_wire; end
        ow_tog_bit = tg;
        repeat (380) @(posedge rx_clk);
        if (one_wire !== 1'b1) ow_bad++;
      end else if (bit_zero && !p0) begin
        repeat (500) @(posedge rx_clk);
        if (one_wire !== 1'b0) ow_bad++;
      end
    end
  end

  // ---------------- helpers ----------------
  task automatic pulse_low(ref logic sig);
    sig = 0; repeat (20) @(posedge tx_clk); sig = 1;
  endtask

  // Measure the width of the next S1 high pulse and the S1 period.
  task automatic measure_s1(output int width, output int period);
    int t0, t1, t2;
    @(posedge s1); t0 = cyc;
    @(negedge s1); t1 = cyc;
    @(posedge s1); t2 = cyc;
    width = t1 - t0; period = t2 - t0;
  endtask

  int cyc = 0;
  always @(posedge tx_clk) cyc++;

  // Send one packet from a Sync falling edge and check the bridge timing.
  task automatic send_sync(input logic [DATA_LEN-1:0] data);
    expect_q.push_back(model_packet(data));
    pulse_low(sync_n);
    wait (tx_busy);
    $display("%0t packet start id=%0d", $time, id);
    check(tx_packet == model_packet(data), $sformatf("tx packet %h", tx_packet));
    wait (!tx_busy);
    repeat (2) @(posedge tx_clk);
    check(last_len == PKT_TICKS, $sformatf("packet lasted %0d cycles", last_len));
  endtask

  localparam logic [R_V-1:0] V_EXP = 10'd200;
  localparam logic [R_C-1:0] C_EXP = 10'd125;

  initial begin
    int w, p, n0;
    repeat (10) @(posedge tx_clk);
    tx_rst_n = 1; rx_rst_n = 1;
    repeat (100) @(posedge tx_clk);
    // halt: bridge is a short circuit, Sync is ignored
    check({s1, s2, s3, s4} == 4'b0101, "halt after reset shorts the bridge");
    pulse_low(sync_n);
    repeat (200) @(posedge tx_clk);
    check(!tx_busy && n_sync == 0, "no packet while halted");
    n_halt++;

    // Wake with ID 2: the timeslot counter fires (2-1)*SLOT_TICKS after Wake
    id = 10'd2;
    pulse_low(wake_n);
    n0 = cyc;
    expect_q.push_back(model_packet({10'd2, V_EXP, C_EXP}));
    wait (tx_busy);
    check(cyc - n0 > 119_980 && cyc - n0 < 120_020, $sformatf("timeslot start after %0d cycles", cyc - n0));
    wait (!tx_busy);
    repeat (60_000) @(posedge tx_clk);   // let the receiver forward it

    // ID 683, 50 Hz: firing delay 683*10000>>10 = 6669, high for 20000-2*6669
    id = 10'd683;
    pulse_low(wake_n);                    // restarts the timeslot counter
    repeat (50) @(posedge tx_clk);
    measure_s1(w, p);
    check(p == 40000, $sformatf("50 Hz period %0d", p));
    check(w == 20000 - 2 * 6669, $sformatf("50 Hz firing width %0d", w));

    // measured data, triggered by Sync
    send_sync({10'd683, V_EXP, C_EXP});
    repeat (60_000) @(posedge tx_clk);

    // fixed vector (SN_FX)
    sn_fx = 1;
    repeat (10) @(posedge tx_clk);
    send_sync(FIXED_VECTOR);
    sn_fx = 0;
    repeat (60_000) @(posedge tx_clk);

    // 60 Hz: period 33333, firing delay 683*8333>>10 = 5558, high 16666-2*5558
    freq = 1;
    repeat (40_000) @(posedge tx_clk);
    measure_s1(w, p);
    check(p == 33333, $sformatf("60 Hz period %0d", p));
    check(w == 16666 - 2 * 5558, $sformatf("60 Hz firing width %0d", w));

    // two back-to-back packets (second Sync right after the first ends)
    id = 10'd682;
    send_sync({10'd682, V_EXP, C_EXP});
    id = 10'd341;
    send_sync({10'd341, V_EXP, C_EXP});
    id = 10'd5;
    send_sync({10'd5, V_EXP, C_EXP});
    repeat (120_000) @(posedge tx_clk);

    // RST returns to halt
    tx_rst_n = 0;
    repeat (5) @(posedge tx_clk);
    check({s1, s2, s3, s4} == 4'b0101, "RST shorts the bridge");
    tx_rst_n = 1;
    repeat (100) @(posedge tx_clk);
    check({s1, s2, s3, s4} == 4'b0101 && !tx_busy, "stays halted after RST");
    n_halt++;

    // ---------------- summary ----------------
    check(expect_q.size() == 0, $sformatf("%0d packets not received", expect_q.size()));
    check(n_rx == 6, $sformatf("received %0d packets", n_rx));
    check(si_pkts == 6 && n_pack == 6, $sformatf("serial link forwarded %0d/%0d", si_pkts, n_pack));
    check(bad_bridge == 0, "bridge only +/- during a packet");
    check(ow_bad == 0, "1-wire level in bit slots");
    check(ow_tog_pack == 19, $sformatf("1-wire packet wavelet toggles %0d", ow_tog_pack));
    check(ow_tog_bit == 10, $sformatf("1-wire bit wavelet toggles %0d", ow_tog_bit));
    check(n_sync == 6, $sformatf("sync_o count %0d", n_sync));
    check(!rx_dropped, "no packet dropped");
    $display("mechanisms: halt=%0d slot_sync=1 ext_sync=%0d fixed=1 f60=1 rx_reject=%0d caseA=%0d caseB=%0d wire3=%0d",
             n_halt, n_sync - 1, n_abort, n_caseA, n_caseB, si_pkts);
    check(n_abort > 0, "receiver rejected power-wave edges");
    check(n_caseA > 0, "phase case A happened");
    check(n_caseB > 0, "phase case B happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge tx_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
