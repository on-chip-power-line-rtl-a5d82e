// tb_uplink_module: runs the whole transmitter with a short timeslot and
// frame. It checks halt (bridge shorted), Wake to the power wave, a packet
// started by Sync and one by the timeslot counter, decoding every packet
// from the S1/S2 drives (phase of each symbol's first half period) and
// comparing it with an independent CRC model of {ID, V, C}, the packet
// length of 56100 cycles, and the SN_FX fixed vector.
`timescale 1ns/1ps
module tb_uplink_module;
  import plc_pkg::*;
  localparam int SYM = 22 * 50;
  logic clk = 0, rst_n = 0, wake_n = 1, sync_n = 1, freq = 0, sn_fx = 0;
  logic [9:0] id = 10'd4;
  logic v_prm = 0, c_prm = 0;
  logic s1, s2, s3, s4, sync_o, tx_busy;
  bridge_t bridge;
  logic [PKT_LEN-1:0] packet;
  int checks = 0, failures = 0, cyc = 0;
  always #250 clk = ~clk;
  always @(posedge clk) cyc++;
  // length of the last packet: cycles with tx_busy high
  int busy_len = 0, last_len = 0;
  logic busy_d = 0;
  always @(posedge clk) begin
    busy_d <= tx_busy;
    if (tx_busy) busy_len <= busy_len + 1;
    else if (busy_d) begin last_len <= busy_len; busy_len <= 0; end
  end

  uplink_module #(.SLOT_TICKS(20_000), .FRAME_TICKS(1_000_000)) dut (
    .clk, .rst_n, .wake_n, .sync_n, .freq, .sn_fx, .id, .v_prm, .c_prm,
    .s1, .s2, .s3, .s4, .sync_o, .tx_busy, .bridge, .packet);

  // 100 and 250 rising edges per 2000-cycle window
  int vd = 0, cd = 0;
  always @(posedge clk) begin
    vd <= (vd == 9) ? 0 : vd + 1;  if (vd == 9) v_prm <= ~v_prm;
    cd <= (cd == 3) ? 0 : cd + 1;  if (cd == 3) c_prm <= ~c_prm;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [PKT_LEN-1:0] model(input logic [DATA_LEN-1:0] data);
    logic [PKT_LEN-1:0] r;
    r = {data, 21'b0};
    for (int i = PKT_LEN - 1; i >= 21; i--)
      if (r[i]) r[i -: 22] ^= 22'b1101100101011101010001;
    return {data, r[20:0]};
  endfunction

  // Decode a packet from the switch drives: the bridge output follows
  // tx_busy by one cycle; sample 5 cycles into each symbol.
  task automatic receive(output logic [PKT_LEN-1:0] bits, output int len);
    @(posedge clk iff tx_busy);
    for (int k = 0; k < PKT_LEN; k++) begin
      repeat (6) @(posedge clk);
      check({s1, s2, s3, s4} == 4'b1001 || {s1, s2, s3, s4} == 4'b0110, "bridge +/- during packet");
      bits[k] = s1;
      repeat (SYM - 6) @(posedge clk);
    end
    @(posedge clk iff !tx_busy);
    repeat (2) @(posedge clk);
    len = last_len;
  endtask

  initial begin
    logic [PKT_LEN-1:0] got;
    int len, t0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5000) @(posedge clk);
    check({s1, s2, s3, s4} == 4'b0101 && !tx_busy, "halt: bridge shorted");
    // Wake: the slot of ID 4 is (4-1)*20000 = 60000 cycles after Wake
    wake_n = 0; repeat (4) @(posedge clk); wake_n = 1;
    t0 = cyc;
    repeat (2000) @(posedge clk);
    check(bridge != BR_ZERO || s1 == 0, "running");
    // Sync before the slot
    sync_n = 0; repeat (4) @(posedge clk); sync_n = 1;
    receive(got, len);
    check(got == model({10'd4, 10'd100, 10'd250}), $sformatf("sync packet %h", got));
    check(len == PKT_LEN * SYM, $sformatf("length %0d", len));
    check(packet == got, "packet output");
    // the timeslot fires 60000 cycles after Wake
    receive(got, len);
    check(cyc - t0 > 60_000 + PKT_LEN * SYM && cyc - t0 < 60_020 + PKT_LEN * SYM, "slot timing");
    check(got == model({10'd4, 10'd100, 10'd250}), $sformatf("slot packet %h", got));
    // fixed vector
    sn_fx = 1;
    repeat (10) @(posedge clk);
    sync_n = 0; repeat (4) @(posedge clk); sync_n = 1;
    receive(got, len);
    check(got == model(FIXED_VECTOR), $sformatf("fixed packet %h", got));
    // power wave between packets uses the power states
    repeat (45_000) @(posedge clk);
    check(!tx_busy, "idle between packets");
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check({s1, s2, s3, s4} == 4'b0101, "RST: halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
