// prm_meter: turns a 1-bit pulse-rate-modulated (PRM) sensor signal into a
// binary measurement (the 'V' and 'C' inputs of the uplink module).
//
// The input is synchronised with two flip-flops, and its rising edges are
// counted over a fixed gate window of WINDOW_TICKS clock cycles. At the end of
// each window the count, saturated to WIDTH bits, is copied to `value` and
// `valid` pulses for one cycle; the count then restarts. `value` holds the
// last complete window until the next one ends, so a packet started at any
// time carries a whole-window measurement.
//
// The 1-bit PRM input and the 10-bit result width follow the published
// design. The gate window is this design's choice: 2000 cycles (1 ms at the
// 2 MHz chip clock) so that the highest countable pulse rate (clk/2) maps
// to about 1000, inside the 10-bit range.
module prm_meter #(
  parameter int unsigned WIDTH        = 10,
  parameter int unsigned WINDOW_TICKS = 2000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             prm,      // asynchronous pulse train
  output logic [WIDTH-1:0] value,    // last complete window count
  output logic             valid     // one-cycle pulse when value updates
);
  localparam int unsigned TW = $clog2(WINDOW_TICKS);
  localparam logic [WIDTH-1:0] MAXV = '1;

  logic [2:0]       sync_q;          // two sync stages plus edge history
  logic [TW-1:0]    tick_q;
  logic [WIDTH-1:0] cnt_q;
  logic             rise;
  logic             last_tick;

  assign rise      = sync_q[1] & ~sync_q[2];
  assign last_tick = (tick_q == TW'(WINDOW_TICKS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q <= '0;
      tick_q <= '0;
      cnt_q  <= '0;
      value  <= '0;
      valid  <= 1'b0;
    end else begin
      sync_q <= {sync_q[1:0], prm};
      valid  <= 1'b0;
      if (last_tick) begin
        tick_q <= '0;
        // the edge seen in the last cycle still belongs to this window
        value  <= (rise && cnt_q != MAXV) ? cnt_q + 1'b1 : cnt_q;
        valid  <= 1'b1;
        cnt_q  <= '0;
      end else begin
        tick_q <= tick_q + 1'b1;
        if (rise && cnt_q != MAXV) cnt_q <= cnt_q + 1'b1;
      end
    end
  end
endmodule
