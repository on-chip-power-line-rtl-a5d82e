// rx_backend: the receiver back-end (the FPGA part of the receiver). It takes
// the digitised line current `vs` from the analog front end, recovers the
// BPSK packets sent by the uplink modules and forwards them over the 1-wire
// and 3-wire links.
//
// Chain: rx_despike ('DF') -> rx_dpll ('PLL' and 'fc Gen') -> rx_demod (XNOR,
// 'CNTR', 'S/H') -> rx_serial_if ('SI'). The carrier period, symbol length
// and packet length must match the transmitter: at the default 2 MHz clock,
// HALF = 25 (40 kHz), 22 periods per symbol and 51 symbols. A packet is
// decoded when its last symbol ends: `pkt_valid` pulses about LEN+3 cycles
// after the end of the packet on `vs`, and play-out on the serial links
// then takes 52 slots of 1000 cycles. `rx_locked` is high while a qualified packet is
// received, `si_busy` during play-out. `rx_abort` pulses when a packet
// candidate is rejected or lost, `dropped` when a packet arrives during
// play-out. The chain follows the published receiver; the details are
// those of its blocks.
module rx_backend #(
  parameter int unsigned CLK_HZ    = 2_000_000,
  parameter int unsigned FC_HZ     = 40_000,
  parameter int unsigned PERIODS   = 22,
  parameter int unsigned NSYM      = 51,
  parameter int unsigned DF_LEN    = 3,
  parameter int unsigned BIT_TICKS = 1000
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            vs,
  output logic            pack_strt,
  output logic            bit_one,
  output logic            bit_zero,
  output logic            one_wire,
  output logic [NSYM-1:0] pkt,
  output logic            pkt_valid,
  output logic            rx_abort,
  output logic            rx_locked,
  output logic            rx_case_b,
  output logic            si_busy,
  output logic            dropped
);
  localparam int unsigned HALF = CLK_HZ / (2 * FC_HZ);

  logic sig, edge_s, ref_s, active, start, sym_end, done, lvl0;

  rx_despike #(.LEN(DF_LEN)) u_df (
    .clk, .rst_n, .din(vs), .sig, .edge_o(edge_s)
  );

  rx_dpll #(.HALF(HALF), .PERIODS(PERIODS), .NSYM(NSYM)) u_pll (
    .clk, .rst_n, .sig, .edge_i(edge_s), .ref_o(ref_s), .active, .locked(rx_locked),
    .start, .sym_end, .done, .cand_drop(rx_abort), .lvl0, .case_b(rx_case_b), .rev_seen()
  );

  rx_demod #(.HALF(HALF), .PERIODS(PERIODS), .NSYM(NSYM)) u_dem (
    .clk, .rst_n, .sig, .ref_i(ref_s), .active, .start, .sym_end, .done,
    .lvl0, .case_b(rx_case_b), .pkt, .pkt_valid, .dbit(), .dvalid()
  );

  rx_serial_if #(.NBITS(NSYM), .BIT_TICKS(BIT_TICKS)) u_si (
    .clk, .rst_n, .pkt, .pkt_valid, .pack_strt, .bit_one, .bit_zero, .one_wire,
    .busy(si_busy), .dropped
  );
endmodule
