// timeslot_counter: the uplink module's built-in timeslot estimator.
//
// Every cell of the string owns one transmission slot per frame; the slot is
// chosen by its ID. Cells are numbered 1 to 1000; a `wake` pulse loads a
// down-counter with (id-1)*SLOT_TICKS (0 for the unused ID 0).
// While `en` is high the counter decrements each cycle; when it reaches zero
// `sync` pulses for one cycle (the counter "overflows") and the counter is
// reloaded with FRAME_TICKS-1, so the cell transmits once per frame at a
// fixed offset after the common Wake: the first `sync` comes (id-1)*SLOT_TICKS+1
// cycles after `wake` (registered output). While `en` is low the counter
// holds.
//
// That the counter is ID-based, is restarted by Wake and triggers Sync on
// overflow is the published behaviour. The frame is 1 minute (the published
// sampling rate of 1/min at the 2 MHz clock) and is split into slots of
// 60 ms for up to 1000 cells; those slot sizes are this design's choice.
// IDs above 1000 fall outside the frame. Numbering from 1 is this design's
// choice: it keeps every ID field from being all zeros or all ones, so
// each packet has a phase flip, which the receiver needs (see rx_dpll).
module timeslot_counter #(
  parameter int unsigned ID_W        = 10,
  parameter int unsigned SLOT_TICKS  = 120_000,
  parameter int unsigned FRAME_TICKS = 120_000_000
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            wake,
  input  logic [ID_W-1:0] id,
  output logic            sync
);
  localparam int unsigned CW = $clog2(FRAME_TICKS) + 1;
  localparam int unsigned SW = $clog2(SLOT_TICKS + 1);
  localparam int unsigned PW = ID_W + SW;

  logic [CW-1:0] cnt_q;
  logic          armed_q;   // counter holds a valid target
  logic [PW-1:0] offset;

  assign offset = (id == '0) ? '0 : PW'(id - 1'b1) * PW'(SLOT_TICKS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      armed_q <= 1'b0;
      sync    <= 1'b0;
    end else begin
      sync <= 1'b0;
      if (wake) begin
        cnt_q   <= CW'(offset);
        armed_q <= 1'b1;
      end else if (en && armed_q) begin
        if (cnt_q == '0) begin
          sync  <= 1'b1;
          cnt_q <= CW'(FRAME_TICKS - 1);
        end else begin
          cnt_q <= cnt_q - 1'b1;
        end
      end
    end
  end
endmodule
