// tb_bpsk_line: behavioural line-signal source for the receiver tests. It
// reproduces what the receiver input sees when a switch drive of the uplink
// module is wired to it: `idle_level` between packets, and on `start` a
// packet of NSYM BPSK symbols (PERIODS carrier periods of 2*HALF clk cycles;
// a '1' symbol starts high, a '0' symbol low; word[0] is sent first).
// `busy` is high while the packet is on the line.
module tb_bpsk_line #(
  parameter int HALF = 25,
  parameter int PERIODS = 22,
  parameter int NSYM = 51
) (
  input  logic            clk,
  input  logic            start,
  input  logic [NSYM-1:0] word,
  input  logic            idle_level,
  output logic            line,
  output logic            busy
);
  int t = 0;
  logic [NSYM-1:0] w;
  initial busy = 0;
  always @(posedge clk) begin
    if (!busy) begin
      if (start) begin busy <= 1; t <= 0; w <= word; end
    end else begin
      if (t == NSYM * PERIODS * 2 * HALF - 1) busy <= 0;
      t <= t + 1;
    end
  end
  always_comb begin
    automatic int s = t / (PERIODS * 2 * HALF);
    automatic int ph = t % (2 * HALF);
    if (!busy) line = idle_level;
    else       line = (ph < HALF) ? w[s] : ~w[s];
  end
endmodule
