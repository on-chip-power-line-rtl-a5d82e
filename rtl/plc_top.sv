// plc_top: one power-line link: the uplink module of one cell (the ASIC
// part) and the receiver back-end (the FPGA part), as in the prototype.
//
// The analog path between them (H-bridge power stage, power line, current
// sensor, high-pass filter and digitiser) has no logic and is outside this
// module: the switch drives s1..s4 leave as outputs and the digitised line
// signal enters as `rx_vs`. In the prototype one switch drive was wired
// straight to the receiver input, which a test bench can do by tying
// `rx_vs` to `s1`. The two halves have separate clocks and resets because
// they sit on separate chips; both run at 2 MHz by default.
module plc_top
  import plc_pkg::*;
(
  // uplink module (one cell)
  input  logic               tx_clk,
  input  logic               tx_rst_n,
  input  logic               wake_n,
  input  logic               sync_n,
  input  logic               freq,
  input  logic               sn_fx,
  input  logic [R_ID-1:0]    id,
  input  logic               v_prm,
  input  logic               c_prm,
  output logic               s1, s2, s3, s4,
  output logic               sync_o,
  output logic               tx_busy,
  output bridge_t            bridge,
  output logic [PKT_LEN-1:0] tx_packet,
  // receiver back-end
  input  logic               rx_clk,
  input  logic               rx_rst_n,
  input  logic               rx_vs,
  output logic               pack_strt,
  output logic               bit_one,
  output logic               bit_zero,
  output logic               one_wire,
  output logic [PKT_LEN-1:0] rx_packet,
  output logic               rx_valid,
  output logic               rx_abort,
  output logic               rx_locked,
  output logic               rx_case_b,
  output logic               si_busy,
  output logic               rx_dropped
);
  uplink_module u_tx (
    .clk(tx_clk), .rst_n(tx_rst_n), .wake_n, .sync_n, .freq, .sn_fx, .id,
    .v_prm, .c_prm, .s1, .s2, .s3, .s4, .sync_o, .tx_busy, .bridge,
    .packet(tx_packet)
  );

  rx_backend #(.NSYM(PKT_LEN)) u_rx (
    .clk(rx_clk), .rst_n(rx_rst_n), .vs(rx_vs), .pack_strt, .bit_one, .bit_zero,
    .one_wire, .pkt(rx_packet), .pkt_valid(rx_valid), .rx_abort, .rx_locked, .rx_case_b, .si_busy,
    .dropped(rx_dropped)
  );
endmodule
