// tb_string_slots: a string of four cells (IDs 1 to 4) at full size, woken
// by one common Wake pulse. Each cell must send its packet on its own, in
// its slot (id-1)*120000 cycles after Wake, with no two cells on the line at the
// same time. The receiver input is the S1 drive of the cell that is sending
// (a digital stand-in for the summed line current) and must decode four
// packets carrying IDs 1, 2, 3, 4 in that order. The sensors see no pulses,
// so the packets differ only in ID and CRC.
`timescale 1ns/1ps
module tb_string_slots;
  import plc_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, wake_n = 1;
  logic [N-1:0] s1, s2, s3, s4, sync_o, busy;
  bridge_t br [N];
  logic [PKT_LEN-1:0] pk [N];
  logic vs;
  logic pack_strt, bit_one, bit_zero, one_wire, pkt_valid, rx_abort, rx_locked, rx_case_b, si_busy, dropped;
  logic [PKT_LEN-1:0] pkt;
  int checks = 0, failures = 0, cyc = 0;
  always #250 clk = ~clk;
  always @(posedge clk) cyc++;

  for (genvar i = 0; i < N; i++) begin : g_cell
    uplink_module u (.clk, .rst_n, .wake_n, .sync_n(1'b1), .freq(1'b0), .sn_fx(1'b0),
                     .id(R_ID'(i + 1)), .v_prm(1'b0), .c_prm(1'b0), .s1(s1[i]), .s2(s2[i]),
                     .s3(s3[i]), .s4(s4[i]), .sync_o(sync_o[i]), .tx_busy(busy[i]),
                     .bridge(br[i]), .packet(pk[i]));
  end

  always_comb begin
    vs = 1'b0;
    for (int i = 0; i < N; i++) if (busy[i]) vs = s1[i];
  end

  rx_backend rx (.clk, .rst_n, .vs, .pack_strt, .bit_one, .bit_zero, .one_wire, .pkt, .pkt_valid,
                 .rx_abort, .rx_locked, .rx_case_b, .si_busy, .dropped);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int t_wake = 0, overlap = 0, nrx = 0;
  int t_start [N];
  always @(posedge clk) if (rst_n) begin
    if ($countones(busy) > 1) overlap++;
    for (int i = 0; i < N; i++) if (sync_o[i]) t_start[i] = cyc;
    if (pkt_valid) begin
      check(pkt[PKT_LEN-1 -: R_ID] == R_ID'(nrx + 1), $sformatf("packet %0d carries ID %0d", nrx, pkt[PKT_LEN-1 -: R_ID]));
      check(pkt == pk[nrx], "packet equals the cell's packet");
      nrx++;
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    wake_n = 0; repeat (4) @(posedge clk); wake_n = 1;
    t_wake = cyc;
    repeat (N * 120_000 + 60_000) @(posedge clk);
    for (int i = 0; i < N; i++)
      check(t_start[i] - t_wake >= i * 120_000 && t_start[i] - t_wake < i * 120_000 + 10,
            $sformatf("cell %0d starts %0d cycles after Wake", i, t_start[i] - t_wake));
    check(overlap == 0, "one cell on the line at a time");
    check(nrx == N, $sformatf("received %0d packets", nrx));
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
