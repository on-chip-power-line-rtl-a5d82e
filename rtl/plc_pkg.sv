// plc_pkg: constants and types shared by the power-line-communication
// transmitter (uplink module) and the receiver back-end.
//
// The packet is the cell ID, the sensed DC voltage and the sensed DC current
// (10 bits each) followed by a 21-bit CRC field: 51 bits in all. The packet is
// sent least significant bit first, that is from the CRC LSB up to the ID MSB.
// The field widths, the CRC length, the 40 kHz carrier, the 22 carrier periods
// per symbol and the 30-bit fixed test vector are the published numbers. The
// CRC convention (register width 21, the printed 21-bit constant as the
// feedback taps below an implicit x^21, zero initial value, data MSB first,
// no final inversion) is this design's own choice.
package plc_pkg;

  localparam int unsigned R_ID      = 10;   // cell ID bits
  localparam int unsigned R_V       = 10;   // voltage bits
  localparam int unsigned R_C       = 10;   // current bits
  localparam int unsigned DATA_LEN  = R_ID + R_V + R_C;   // 30
  localparam int unsigned CRC_LEN   = 21;
  localparam int unsigned PKT_LEN   = DATA_LEN + CRC_LEN; // 51

  localparam logic [CRC_LEN-1:0]  CRC_POLY     = 21'b101100101011101010001;
  // Vector sent instead of the measurements when SN_FX is high.
  localparam logic [DATA_LEN-1:0] FIXED_VECTOR = 30'b001111111101010101010000111101;

  // Drive state of one H-bridge.
  typedef enum logic [1:0] {
    BR_ZERO = 2'd0,   // both low-side switches on: bridge is a short circuit
    BR_POS  = 2'd1,   // S1 and S4 on: +VDC on the output
    BR_NEG  = 2'd2    // S2 and S3 on: -VDC on the output
  } bridge_t;

  // Bit-parallel CRC over the 30 data bits, MSB first.
  function automatic logic [CRC_LEN-1:0] crc_of(input logic [DATA_LEN-1:0] data);
    logic [CRC_LEN-1:0] r;
    logic fb;
    r = '0;
    for (int i = DATA_LEN - 1; i >= 0; i--) begin
      fb = r[CRC_LEN-1] ^ data[i];
      r  = {r[CRC_LEN-2:0], 1'b0};
      if (fb) r = r ^ CRC_POLY;
    end
    return r;
  endfunction

endpackage
