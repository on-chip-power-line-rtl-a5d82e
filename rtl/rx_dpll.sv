// rx_dpll: blocks 'PLL' and 'fc Gen' of the receiver back-end. It finds the
// start of a BPSK packet in the digitised line signal, generates a square
// reference at the carrier frequency locked to it, and provides the symbol
// timing for the demodulator.
//
// Reference generator: a phase counter `ph` runs over P = 2*HALF cycles; the
// reference is `lvl0` for the first half of each period and its complement
// for the second. At the first edge after idle the counter is aligned to
// that edge and `lvl0` takes the new line level (`start` pulses). The next
// QUAL_EDGES-1 edges must each follow the previous one after HALF-TOL to
// P+TOL cycles, or the candidate is dropped (a too-early edge restarts it,
// a missing edge returns to idle with `cand_drop`); this rejects the slow edges
// of the 50/60 Hz power waveform. While locked, every line edge is compared
// with the nearest reference edge, modulo half a period so that the 180
// degree symbol flips do not disturb the loop, and the counter is moved by
// about half the error (first-order loop). Loss of edges for LOSS_TICKS
// cycles also ends the packet with `cand_drop`.
//
// Symbol timing: symbol windows are PERIODS reference periods long and start
// at the aligned edge; `sym_end` pulses on the last cycle of each window and
// `done` on the last cycle of symbol NSYM-1.
//
// Phase ambiguity: the first edge is either the start of symbol 0 (case A) or
// its middle (case B, when the line already sat at the symbol's first-half
// level). A phase flip makes a line pulse one full period long, centred on a
// symbol boundary; at its closing edge the phase counter is near P/2 in case
// A and near 0 in case B. The first such pulse sets `case_b`, read by the
// demodulator at `done`. A packet with no phase flip is taken as case A;
// with cell IDs 1 to 1000 the ID field always holds both bit values, so a
// real packet always has a flip.
//
// That a PLL locks an internal square generator to the received carrier is
// published; the loop, the packet detection and the ambiguity rule are this
// design's own.
module rx_dpll #(
  parameter int unsigned HALF       = 25,
  parameter int unsigned PERIODS    = 22,
  parameter int unsigned NSYM       = 51,
  parameter int unsigned TOL        = 6,
  parameter int unsigned QUAL_EDGES = 8,
  parameter int unsigned LOSS_TICKS = 4 * HALF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sig,        // despiked line level
  input  logic edge_i,     // sig changed this cycle
  output logic ref_o,      // locked reference square wave
  output logic active,     // a packet candidate is being received
  output logic locked,     // candidate qualified
  output logic start,      // candidate aligned on this cycle's edge
  output logic sym_end,
  output logic done,
  output logic cand_drop,
  output logic lvl0,
  output logic case_b,
  output logic rev_seen
);
  localparam int unsigned P  = 2 * HALF;
  localparam int unsigned PW = $clog2(P) + 2;            // room for signed math
  localparam int unsigned CW = $clog2(LOSS_TICKS + 2) + 1;
  localparam int unsigned RW = $clog2(PERIODS);
  localparam int unsigned SW = $clog2(NSYM);
  localparam int unsigned EW = $clog2(QUAL_EDGES) + 1;

  typedef enum logic [1:0] {IDLE, QUAL, TRACK} state_t;

  state_t                state_q;
  logic [PW-1:0]         ph_q;
  logic [RW-1:0]         per_q;
  logic [SW-1:0]         sym_q;
  logic [CW-1:0]         since_q;
  logic [EW-1:0]         nedge_q;

  logic signed [PW-1:0]  m, e, adj, ph_raw;
  logic                  wrap, too_early, too_late, lost, long_pulse;

  assign active = (state_q != IDLE);
  assign locked = (state_q == TRACK);
  assign ref_o  = (ph_q < PW'(HALF)) ? lvl0 : ~lvl0;

  always_comb begin
    // phase error to the nearest reference edge, in (-HALF/2, HALF/2]
    m   = (ph_q >= PW'(HALF)) ? $signed(ph_q - PW'(HALF)) : $signed(ph_q);
    e   = (2 * m > $signed(PW'(HALF))) ? m - $signed(PW'(HALF)) : m;
    adj = '0;
    if (edge_i && active) adj = (e + ((e > 0) ? 1 : 0)) >>> 1;
    ph_raw = $signed(ph_q) + 1 - adj;
    wrap   = active && (ph_raw >= $signed(PW'(P)));

    sym_end = wrap && per_q == RW'(PERIODS - 1);
    done    = sym_end && sym_q == SW'(NSYM - 1);

    too_early  = edge_i && since_q < CW'(HALF - TOL);
    too_late   = (state_q == QUAL) && since_q > CW'(P + TOL);
    lost       = (state_q == TRACK) && since_q > CW'(LOSS_TICKS);
    long_pulse = edge_i && since_q > CW'(3 * P / 4);
    cand_drop      = too_late || lost;
    start      = edge_i && ((state_q == IDLE) || (state_q == QUAL && too_early));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= IDLE;
      ph_q     <= '0;
      per_q    <= '0;
      sym_q    <= '0;
      since_q  <= '0;
      nedge_q  <= '0;
      lvl0     <= 1'b0;
      case_b   <= 1'b0;
      rev_seen <= 1'b0;
    end else if (start) begin
      state_q  <= QUAL;
      ph_q     <= PW'(1);
      per_q    <= '0;
      sym_q    <= '0;
      since_q  <= CW'(1);
      nedge_q  <= EW'(1);
      lvl0     <= sig;
      case_b   <= 1'b0;
      rev_seen <= 1'b0;
    end else if (state_q == IDLE) begin
      since_q <= '0;
    end else if (cand_drop || done) begin
      state_q <= IDLE;
    end else begin
      since_q <= edge_i ? CW'(1) : since_q + 1'b1;
      ph_q    <= wrap ? PW'(ph_raw - $signed(PW'(P))) : PW'(ph_raw);
      if (wrap) begin
        if (per_q == RW'(PERIODS - 1)) begin
          per_q <= '0;
          sym_q <= sym_q + 1'b1;
        end else begin
          per_q <= per_q + 1'b1;
        end
      end
      if (edge_i && state_q == QUAL) begin
        nedge_q <= nedge_q + 1'b1;
        if (nedge_q == EW'(QUAL_EDGES - 1)) state_q <= TRACK;
      end
      if (long_pulse && !rev_seen) begin
        rev_seen <= 1'b1;
        case_b   <= (ph_q < PW'(P / 4)) || (ph_q >= PW'(3 * P / 4));
      end
    end
  end
endmodule
