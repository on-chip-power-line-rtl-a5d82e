// tb_paper_vectors: sends the three published 30-bit test vectors over the
// complete link (plc_top at its defaults, S1 wired to the receiver):
//   fixed vector  (SN_FX = 1)          00111 11111 01010 10101 00001 11101
//   sensing zero  (no sensor pulses)   11111 00000 00000 00000 00000 00000
//   sensing value (sensor pulse rates) 11111 00000 01000 00101 11100 00111
// For the measured cases the PRM inputs are driven at 0/0 and 261/903
// rising edges per 2000-cycle window. Each received packet must carry the
// vector and the CRC of an independent model; the CRC is printed next to
// the published one for comparison (this design's CRC convention differs).
`timescale 1ns/1ps
module tb_paper_vectors;
  import plc_pkg::*;
  logic tx_clk = 0, rx_clk = 0, tx_rst_n = 0, rx_rst_n = 0;
  logic wake_n = 1, sync_n = 1, freq = 0, sn_fx = 0;
  logic [R_ID-1:0] id = 10'b1111100000;
  logic v_prm = 0, c_prm = 0;
  logic s1, s2, s3, s4, sync_o, tx_busy;
  bridge_t bridge;
  logic [PKT_LEN-1:0] tx_packet, rx_packet;
  logic pack_strt, bit_one, bit_zero, one_wire, rx_valid, rx_abort, rx_locked, rx_case_b, si_busy, rx_dropped;
  int checks = 0, failures = 0;
  always #250 tx_clk = ~tx_clk;
  always #250 rx_clk = ~rx_clk;

  plc_top dut (
    .tx_clk, .tx_rst_n, .wake_n, .sync_n, .freq, .sn_fx, .id, .v_prm, .c_prm,
    .s1, .s2, .s3, .s4, .sync_o, .tx_busy, .bridge, .tx_packet,
    .rx_clk, .rx_rst_n, .rx_vs(s1), .pack_strt, .bit_one, .bit_zero, .one_wire,
    .rx_packet, .rx_valid, .rx_abort, .rx_locked, .rx_case_b, .si_busy, .rx_dropped);

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

  // PRM sources: a phase accumulator gives exactly `rate` rising edges in
  // every 2000 cycles (one-cycle pulses, rate < 1000)
  int vrate = 0, crate = 0, vacc = 0, cacc = 0;
  always @(posedge tx_clk) begin
    v_prm <= (vacc + vrate >= 2000);
    c_prm <= (cacc + crate >= 2000);
    vacc  <= (vacc + vrate) % 2000;
    cacc  <= (cacc + crate) % 2000;
  end

  task automatic run(input logic [DATA_LEN-1:0] vec, input logic [CRC_LEN-1:0] published);
    logic [PKT_LEN-1:0] e;
    e = model(vec);
    repeat (6000) @(posedge tx_clk);          // let the meters settle
    sync_n = 0; repeat (10) @(posedge tx_clk); sync_n = 1;
    @(posedge rx_clk iff rx_valid);
    check(rx_packet == e, $sformatf("received %h expected %h", rx_packet, e));
    check(tx_packet == e, "transmitted packet");
    $display("vector %b: CRC %b (published %b)", vec, rx_packet[CRC_LEN-1:0], published);
    @(negedge si_busy);
  endtask

  initial begin
    repeat (5) @(posedge tx_clk);
    tx_rst_n = 1; rx_rst_n = 1;
    wake_n = 0; repeat (10) @(posedge tx_clk); wake_n = 1;
    sn_fx = 1;
    run(30'b001111111101010101010000111101, 21'b111100000111110000111);
    sn_fx = 0;
    vrate = 0; crate = 0;
    run({10'b1111100000, 10'd0, 10'd0}, 21'b111010000000111001101);
    vrate = 261; crate = 903;
    run({10'b1111100000, 10'b0100000101, 10'b1110000111}, 21'b000001110101100000001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (600_000) @(posedge tx_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
