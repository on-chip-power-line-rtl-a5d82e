// rx_serial_if: block 'SI' of the receiver back-end. It forwards each decoded
// packet to the remote user interface over two alternative links.
//
// A packet (`pkt`, `pkt_valid`) is played out in NBITS+1 slots of BIT_TICKS
// cycles: slot 0 marks the packet, slots 1..NBITS carry pkt[0] first.
//  - 3-wire link: a PULSE_TICKS-long high pulse at the start of a slot on
//    `pack_strt` (slot 0), `bit_one` or `bit_zero` (bit slots).
//  - 1-wire link: at the start of every slot a square wavelet of WAVE_TICKS
//    cycles, with half period PACK_HALF in the packet slot and BIT_HALF in a
//    bit slot; for the rest of the slot the line shows the bit (low in the
//    packet slot).
// `busy` is high during play-out; a packet that arrives while busy is
// dropped and `dropped` pulses. Outputs are registered: the first slot starts
// one cycle after `pkt_valid`.
//
// The two links, the three wires and the two wavelet frequencies follow the
// published receiver; slot length (500 us, shorter than a received packet so
// that back-to-back packets are not lost), wavelet length and frequencies
// (200 kHz and 100 kHz) and pulse width are this design's choices.
module rx_serial_if #(
  parameter int unsigned NBITS       = 51,
  parameter int unsigned BIT_TICKS   = 1000,
  parameter int unsigned WAVE_TICKS  = 100,
  parameter int unsigned PACK_HALF   = 5,
  parameter int unsigned BIT_HALF    = 10,
  parameter int unsigned PULSE_TICKS = 100
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NBITS-1:0] pkt,
  input  logic             pkt_valid,
  output logic             pack_strt,
  output logic             bit_one,
  output logic             bit_zero,
  output logic             one_wire,
  output logic             busy,
  output logic             dropped
);
  localparam int unsigned TW = $clog2(BIT_TICKS);
  localparam int unsigned SW = $clog2(NBITS + 1);
  localparam int unsigned HW = $clog2(PACK_HALF > BIT_HALF ? PACK_HALF : BIT_HALF) + 1;

  logic [NBITS-1:0] sr_q;
  logic [TW-1:0]    t_q;
  logic [SW-1:0]    slot_q;
  logic [HW-1:0]    wc_q;
  logic             wv_q;
  logic             pslot, cur, last_t;
  logic [HW-1:0]    half;

  assign pslot  = (slot_q == '0);
  assign cur    = sr_q[0];
  assign last_t = (t_q == TW'(BIT_TICKS - 1));
  assign half   = pslot ? HW'(PACK_HALF) : HW'(BIT_HALF);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_q      <= '0;
      t_q       <= '0;
      slot_q    <= '0;
      wc_q      <= '0;
      wv_q      <= 1'b0;
      busy      <= 1'b0;
      dropped   <= 1'b0;
      pack_strt <= 1'b0;
      bit_one   <= 1'b0;
      bit_zero  <= 1'b0;
      one_wire  <= 1'b0;
    end else begin
      dropped <= pkt_valid && busy;
      if (!busy) begin
        t_q    <= '0;
        slot_q <= '0;
        wc_q   <= '0;
        wv_q   <= 1'b1;
        if (pkt_valid) begin
          sr_q <= pkt;
          busy <= 1'b1;
        end
        pack_strt <= 1'b0;
        bit_one   <= 1'b0;
        bit_zero  <= 1'b0;
        one_wire  <= 1'b0;
      end else begin
        // outputs for the current cycle of the current slot
        pack_strt <= pslot && t_q < TW'(PULSE_TICKS);
        bit_one   <= !pslot && t_q < TW'(PULSE_TICKS) && cur;
        bit_zero  <= !pslot && t_q < TW'(PULSE_TICKS) && !cur;
        one_wire  <= (t_q < TW'(WAVE_TICKS)) ? wv_q : (!pslot && cur);
        // wavelet oscillator
        if (wc_q == half - 1'b1) begin
          wc_q <= '0;
          wv_q <= ~wv_q;
        end else begin
          wc_q <= wc_q + 1'b1;
        end
        // slot sequencing
        if (last_t) begin
          t_q  <= '0;
          wc_q <= '0;
          wv_q <= 1'b1;
          if (!pslot) sr_q <= {1'b0, sr_q[NBITS-1:1]};
          if (slot_q == SW'(NBITS)) busy   <= 1'b0;
          else                      slot_q <= slot_q + 1'b1;
        end else begin
          t_q <= t_q + 1'b1;
        end
      end
    end
  end
endmodule
