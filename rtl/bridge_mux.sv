// bridge_mux: block 'M' of the uplink module. It decides what the H-bridge
// does and drives its four switches.
//
// While `run` is low the bridge is a short circuit (BR_ZERO). While a packet
// is being sent (`tx_busy`) the power component is replaced by the data
// carrier: carrier 1 gives BR_POS, carrier 0 BR_NEG. Otherwise the power
// component from block 'P' passes. Switch map: S1/S2 are the high/low
// switches of the left leg, S3/S4 those of the right leg; BR_POS = S1+S4,
// BR_NEG = S2+S3, BR_ZERO = S2+S4. Outputs are registered (one cycle), so a
// leg never sees both of its switches on.
//
// The replacement of the power signal by the data signal and the short
// circuit in the low-power state follow the published design; the switch
// naming and the choice of the low-side pair for the short are this design's.
// No dead time is inserted: the published design mentions none.
module bridge_mux
  import plc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    run,
  input  logic    tx_busy,
  input  logic    carrier,
  input  bridge_t power_level,
  output bridge_t state,       // chosen bridge state (registered)
  output logic    s1, s2, s3, s4
);
  bridge_t nxt;

  always_comb begin
    if (!run)         nxt = BR_ZERO;
    else if (tx_busy) nxt = carrier ? BR_POS : BR_NEG;
    else              nxt = power_level;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= BR_ZERO;
      {s1, s2, s3, s4} <= 4'b0101;
    end else begin
      state <= nxt;
      unique case (nxt)
        BR_POS:  {s1, s2, s3, s4} <= 4'b1001;
        BR_NEG:  {s1, s2, s3, s4} <= 4'b0110;
        default: {s1, s2, s3, s4} <= 4'b0101;
      endcase
    end
  end

  // A leg must never short the DC source.
  a_no_shoot: assert property (@(posedge clk) disable iff (!rst_n)
                               !(s1 && s2) && !(s3 && s4));
endmodule
