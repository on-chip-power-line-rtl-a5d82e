// uplink_module: the on-chip transmitter of one mixed signal transmission
// module (MSTM) of a cascaded H-bridge string. It drives the four switches of
// the cell's H-bridge so that the bridge either adds its share of the AC
// power waveform or, during the cell's timeslot, sends a telemetry packet as
// BPSK on the same power line.
//
// Blocks: uplink_ctrl (RST/Wake/Sync, halt and run), timeslot_counter (ID
// based slot, triggers Sync), two prm_meter ('V' and 'C' inputs),
// info_packetizer ('I': packet and CRC), bpsk_modulator ('D': 40 kHz carrier,
// 22 periods per symbol), power_pulse_gen ('P': 50/60 Hz quasi-square wave
// with ID-based firing angle) and bridge_mux ('M': power or data, switch map).
//
// Interface: `id` is hard-wired per cell; `freq` selects 60 Hz (1) or 50 Hz
// (0); `sn_fx` sends the fixed test vector instead of the measurements;
// `wake_n` and `sync_n` act on falling edges; `rst_n` returns the module to
// halt. Timing: a packet starts about 4 cycles after a Sync falling edge and
// the bridge carries it for 51*22*50 = 56100 cycles (28.05 ms at 2 MHz).
// `sync_o` pulses when a packet starts, `tx_busy` is high while it is sent.
// Structure, pins and timing follow the published design; the published PLL
// that aligns the power components of the string is not included (its
// working is not described).
module uplink_module
  import plc_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 2_000_000,
  parameter int unsigned FC_HZ        = 40_000,
  parameter int unsigned PERIODS      = 22,
  parameter int unsigned WINDOW_TICKS = 2000,
  parameter int unsigned SLOT_TICKS   = 120_000,
  parameter int unsigned FRAME_TICKS  = 120_000_000
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wake_n,
  input  logic            sync_n,
  input  logic            freq,
  input  logic            sn_fx,
  input  logic [R_ID-1:0] id,
  input  logic            v_prm,
  input  logic            c_prm,
  output logic            s1, s2, s3, s4,
  output logic            sync_o,
  output logic            tx_busy,
  output bridge_t         bridge,  // current bridge state, for observation
  output logic [PKT_LEN-1:0] packet   // last packet loaded, for observation
);
  localparam int unsigned HALF = CLK_HZ / (2 * FC_HZ);

  logic [1:0]     freq_sq, fx_sq;
  logic           run, wake_pulse, tx_start, slot_sync;
  logic           bit_s, next_s, carrier;
  logic [R_V-1:0] v_val;
  logic [R_C-1:0] c_val;
  bridge_t        power_level;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      freq_sq <= '0;
      fx_sq   <= '0;
    end else begin
      freq_sq <= {freq_sq[0], freq};
      fx_sq   <= {fx_sq[0], sn_fx};
    end
  end

  uplink_ctrl u_ctrl (
    .clk, .rst_n, .wake_n, .sync_n, .slot_sync, .tx_busy,
    .run, .wake_pulse, .tx_start, .sync_dbg(sync_o)
  );

  timeslot_counter #(.ID_W(R_ID), .SLOT_TICKS(SLOT_TICKS), .FRAME_TICKS(FRAME_TICKS)) u_slot (
    .clk, .rst_n, .en(run), .wake(wake_pulse), .id, .sync(slot_sync)
  );

  prm_meter #(.WIDTH(R_V), .WINDOW_TICKS(WINDOW_TICKS)) u_vmeas (
    .clk, .rst_n, .prm(v_prm), .value(v_val), .valid()
  );

  prm_meter #(.WIDTH(R_C), .WINDOW_TICKS(WINDOW_TICKS)) u_cmeas (
    .clk, .rst_n, .prm(c_prm), .value(c_val), .valid()
  );

  info_packetizer u_info (
    .clk, .rst_n, .id, .v_meas(v_val), .c_meas(c_val), .fixed_sel(fx_sq[1]),
    .load(tx_start), .shift(next_s), .bit_o(bit_s), .packet
  );

  bpsk_modulator #(.HALF(HALF), .PERIODS(PERIODS), .NSYM(PKT_LEN)) u_mod (
    .clk, .rst_n, .start(tx_start), .bit_i(bit_s), .carrier, .next(next_s), .busy(tx_busy)
  );

  power_pulse_gen #(.CLK_HZ(CLK_HZ), .ID_W(R_ID)) u_power (
    .clk, .rst_n, .en(run), .freq_sel(freq_sq[1]), .id, .level(power_level)
  );

  bridge_mux u_mux (
    .clk, .rst_n, .run, .tx_busy, .carrier, .power_level, .state(bridge),
    .s1, .s2, .s3, .s4
  );
endmodule
