// power_pulse_gen: block 'P' of the uplink module. It produces this module's
// component of the staircase (pseudo-sinusoidal) output of a cascaded H-bridge
// inverter: a quasi-square wave at 50 Hz or 60 Hz whose firing angle is set
// by the cell ID.
//
// A cycle counter runs over one output period of T = CLK_HZ/f cycles (f is
// F_LO when `freq_sel` is 0, F_HI when it is 1). With firing delay
// d = (id * T/4) >> ID_W, i.e. a firing angle of id/2^ID_W of 90 degrees,
// the output is BR_POS for d <= t < T/2-d, BR_NEG for T/2+d <= t < T-d and
// BR_ZERO otherwise. While `en` is low the counter is held at 0 and the
// output is BR_ZERO. The level is registered: one cycle of latency.
//
// The 50/60 Hz choice by the 'Freq' input and the ID-defined firing angle
// follow the published design; the linear ID-to-angle law is this design's
// own choice.
module power_pulse_gen
  import plc_pkg::*;
#(
  parameter int unsigned CLK_HZ = 2_000_000,
  parameter int unsigned F_LO   = 50,
  parameter int unsigned F_HI   = 60,
  parameter int unsigned ID_W   = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            freq_sel,
  input  logic [ID_W-1:0] id,
  output bridge_t         level
);
  localparam int unsigned T_LO = CLK_HZ / F_LO;
  localparam int unsigned T_HI = CLK_HZ / F_HI;
  localparam int unsigned TW   = $clog2(T_LO + 1);
  localparam int unsigned MW   = TW + ID_W;

  logic [TW-1:0] t_q;
  logic [TW-1:0] per, half, d;
  logic [MW-1:0] prod;
  bridge_t       lvl_d;

  always_comb begin
    per  = freq_sel ? TW'(T_HI) : TW'(T_LO);
    half = per >> 1;
    prod = MW'(id) * MW'(per >> 2);
    d    = TW'(prod >> ID_W);
    if (t_q >= d && t_q < half - d)            lvl_d = BR_POS;
    else if (t_q >= half + d && t_q < per - d) lvl_d = BR_NEG;
    else                                        lvl_d = BR_ZERO;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_q   <= '0;
      level <= BR_ZERO;
    end else if (!en) begin
      t_q   <= '0;
      level <= BR_ZERO;
    end else begin
      t_q   <= (t_q >= per - 1'b1) ? '0 : t_q + 1'b1;
      level <= lvl_d;
    end
  end
endmodule
