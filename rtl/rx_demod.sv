// rx_demod: the XNOR down-converter, the integrator 'CNTR' and the
// sample-and-hold 'S/H' of the receiver back-end.
//
// While a packet is being received (`active`), each cycle the line level is
// compared with the PLL reference by an XNOR: a match adds one to a signed
// accumulator, a mismatch subtracts one. At `sym_end` the sign of the sum is
// the symbol decision d (1: same phase as the reference) and is shifted into
// a register; the accumulator is cleared. `start` clears both.
//
// The reference is aligned to the packet's first edge, so d tells only whether
// a symbol has the phase of symbol 0. At `done` the absolute value of symbol 0
// is b0 = lvl0 ^ case_b (a '1' symbol starts high), and every bit becomes
// b = d ? b0 : ~b0. The NSYM decoded bits are then held in `pkt`, first
// received bit in pkt[0] (the transmitter's bit order), and `pkt_valid`
// pulses one cycle after `done`. `dbit`/`dvalid` show each raw decision.
//
// XNOR down-conversion with integration and hold follows the published
// receiver; the signed accumulator and the polarity rule are this design's.
module rx_demod #(
  parameter int unsigned HALF    = 25,
  parameter int unsigned PERIODS = 22,
  parameter int unsigned NSYM    = 51
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sig,
  input  logic            ref_i,
  input  logic            active,
  input  logic            start,
  input  logic            sym_end,
  input  logic            done,
  input  logic            lvl0,
  input  logic            case_b,
  output logic [NSYM-1:0] pkt,
  output logic            pkt_valid,
  output logic            dbit,
  output logic            dvalid
);
  localparam int unsigned AW = $clog2(2 * HALF * PERIODS) + 2;

  logic signed [AW-1:0] acc_q, acc_n;
  logic [NSYM-1:0]      d_q, d_n;
  logic                 d, b0;

  always_comb begin
    acc_n = acc_q + ((sig ~^ ref_i) ? AW'(1) : -AW'(1));
    d     = (acc_n > 0);
    d_n   = {d, d_q[NSYM-1:1]};
    b0    = lvl0 ^ case_b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      d_q       <= '0;
      pkt       <= '0;
      pkt_valid <= 1'b0;
      dbit      <= 1'b0;
      dvalid    <= 1'b0;
    end else begin
      pkt_valid <= 1'b0;
      dvalid    <= 1'b0;
      if (start) begin
        acc_q <= '0;
        d_q   <= '0;
      end else if (active) begin
        if (sym_end) begin
          acc_q  <= '0;
          d_q    <= d_n;
          dbit   <= d;
          dvalid <= 1'b1;
          if (done) begin
            pkt       <= b0 ? d_n : ~d_n;
            pkt_valid <= 1'b1;
          end
        end else begin
          acc_q <= acc_n;
        end
      end
    end
  end
endmodule
