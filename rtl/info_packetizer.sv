// info_packetizer: block 'I' of the uplink module. It assembles the telemetry
// packet and hands it out one bit at a time.
//
// On `load` it captures {ID, voltage, current} (or the fixed 30-bit test
// vector when `fixed_sel` is high), appends the 21-bit CRC of those 30 bits
// and places the 51-bit word in a shift register. `bit_o` is always the
// register's LSB; each `shift` pulse moves the next bit down. The order on
// the line is therefore CRC LSB first and ID MSB last, as published.
// `load` wins over `shift` in the same cycle. The bit for a load is valid
// on the cycle after `load`.
//
// Packet layout, field order (ID, voltage, current) and the fixed vector follow
// the published design; the CRC convention is that of plc_pkg::crc_of.
module info_packetizer
  import plc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [R_ID-1:0] id,
  input  logic [R_V-1:0]  v_meas,
  input  logic [R_C-1:0]  c_meas,
  input  logic            fixed_sel,   // SN_FX: send FIXED_VECTOR instead
  input  logic            load,
  input  logic            shift,
  output logic            bit_o,
  output logic [PKT_LEN-1:0] packet    // word captured by the last load
);
  logic [DATA_LEN-1:0] data;
  logic [PKT_LEN-1:0]  sr_q;

  assign data  = fixed_sel ? FIXED_VECTOR : {id, v_meas, c_meas};
  assign bit_o = sr_q[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_q   <= '0;
      packet <= '0;
    end else if (load) begin
      sr_q   <= {data, crc_of(data)};
      packet <= {data, crc_of(data)};
    end else if (shift) begin
      sr_q   <= {1'b0, sr_q[PKT_LEN-1:1]};
    end
  end
endmodule
