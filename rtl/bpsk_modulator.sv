// bpsk_modulator: block 'D' of the uplink module. A square-wave generator at
// the carrier frequency whose phase is inverted (180 degrees) by the serial
// bit, giving rectangular-pulse BPSK.
//
// A `start` pulse begins a packet of NSYM symbols. Each symbol lasts
// PERIODS carrier periods of HALF*2 clock cycles. Within a period the output
// `carrier` equals the current bit for the first half and its complement for
// the second half, so a '1' symbol starts high and a '0' symbol starts low.
// On the last cycle of each symbol `next` pulses so that the bit source moves
// on. `busy` is high from the cycle after `start` for exactly
// NSYM*PERIODS*2*HALF cycles; `carrier` is meaningful only while busy.
//
// Carrier 40 kHz (HALF = 25 at the 2 MHz clock), 22 periods per symbol and
// 51 symbols follow the published numbers: 550 us per symbol, 28.05 ms per
// packet. Which bit value starts high is this design's choice.
module bpsk_modulator #(
  parameter int unsigned HALF    = 25,   // clock cycles per half carrier period
  parameter int unsigned PERIODS = 22,   // carrier periods per symbol
  parameter int unsigned NSYM    = 51    // symbols per packet
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic bit_i,
  output logic carrier,
  output logic next,
  output logic busy
);
  localparam int unsigned P  = 2 * HALF;
  localparam int unsigned TW = $clog2(P);
  localparam int unsigned PW = $clog2(PERIODS);
  localparam int unsigned SW = $clog2(NSYM);

  logic [TW-1:0] tick_q;
  logic [PW-1:0] per_q;
  logic [SW-1:0] sym_q;
  logic          sym_end;

  assign sym_end = busy && tick_q == TW'(P - 1) && per_q == PW'(PERIODS - 1);
  assign next    = sym_end;
  assign carrier = (tick_q < TW'(HALF)) ? bit_i : ~bit_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      tick_q <= '0;
      per_q  <= '0;
      sym_q  <= '0;
    end else if (!busy) begin
      tick_q <= '0;
      per_q  <= '0;
      sym_q  <= '0;
      busy   <= start;
    end else if (tick_q != TW'(P - 1)) begin
      tick_q <= tick_q + 1'b1;
    end else begin
      tick_q <= '0;
      if (per_q != PW'(PERIODS - 1)) begin
        per_q <= per_q + 1'b1;
      end else begin
        per_q <= '0;
        if (sym_q == SW'(NSYM - 1)) busy  <= 1'b0;
        else                        sym_q <= sym_q + 1'b1;
      end
    end
  end
endmodule
