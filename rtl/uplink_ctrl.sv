// uplink_ctrl: control of the uplink module: halt/run state and the start of
// a packet transmission.
//
// The active-low 'Wake' and 'Sync' pins are synchronised (two flip-flops) and
// their falling edges detected. After reset (the 'RST' pin) the module is in
// HALT: the H-bridge is held as a short circuit so that the rest of the
// string keeps conducting. A Wake falling edge moves it to RUN; further Wake
// edges only restart the timeslot counter (`wake_pulse`). In RUN a packet
// starts (`tx_start`, one cycle) on a Sync falling edge or on the timeslot
// counter's `slot_sync`, unless a packet is already being sent.
// `sync_dbg` shows every accepted start for observation. Outputs are
// registered except `tx_start`, which is combinational from registered edges.
//
// Halt on reset, Wake to leave halt, falling-edge Sync and the timeslot
// trigger follow the published design. Ignoring a trigger during a packet and
// refusing to transmit while halted are this design's choices.
module uplink_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic wake_n,      // asynchronous, active-low pulse
  input  logic sync_n,      // asynchronous, active-low pulse
  input  logic slot_sync,   // from timeslot_counter
  input  logic tx_busy,
  output logic run,
  output logic wake_pulse,
  output logic tx_start,
  output logic sync_dbg
);
  typedef enum logic {HALT = 1'b0, RUN = 1'b1} state_t;

  state_t     state_q;
  logic [2:0] wake_sq, sync_sq;
  logic       sync_fall;

  assign wake_pulse = wake_sq[2] & ~wake_sq[1];
  assign sync_fall  = sync_sq[2] & ~sync_sq[1];
  assign run        = (state_q == RUN);
  assign tx_start   = run && !tx_busy && (sync_fall || slot_sync);
  assign sync_dbg   = tx_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wake_sq <= '1;
      sync_sq <= '1;
      state_q <= HALT;
    end else begin
      wake_sq <= {wake_sq[1:0], wake_n};
      sync_sq <= {sync_sq[1:0], sync_n};
      if (wake_pulse) state_q <= RUN;
    end
  end

  // A start is only ever issued in RUN and never during a packet.
  a_start_ok: assert property (@(posedge clk) disable iff (!rst_n)
                               tx_start |-> (run && !tx_busy));
endmodule
