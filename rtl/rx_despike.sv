// rx_despike: block 'DF' of the receiver back-end. It removes short spikes
// from the digitised line signal before the PLL and the demodulator see it.
//
// The asynchronous input is synchronised with two flip-flops. The output
// `sig` takes a new value only after the synchronised input has shown that
// value on LEN consecutive samples, so any pulse shorter than LEN cycles is
// dropped. Latency from an input edge to `sig` is LEN+2 cycles. `edge_o`
// pulses in the cycle in which `sig` changes (it compares `sig` with its
// value one cycle before).
//
// That the block removes high-frequency spikes is published; the filter law
// (a run-length check) and LEN = 3 (1.5 us at 2 MHz, far below the 12.5 us
// half carrier period) are this design's choices.
module rx_despike #(
  parameter int unsigned LEN = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic sig,
  output logic edge_o
);
  logic [1:0]     sync_q;
  logic [LEN-1:0] hist_q;
  logic           sig_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q <= '0;
      hist_q <= '0;
      sig    <= 1'b0;
      sig_d  <= 1'b0;
    end else begin
      sync_q <= {sync_q[0], din};
      hist_q <= {hist_q[LEN-2:0], sync_q[1]};
      if (&hist_q)       sig <= 1'b1;
      else if (~|hist_q) sig <= 1'b0;
      sig_d <= sig;
    end
  end

  assign edge_o = sig ^ sig_d;
endmodule
