// tb_bpsk_modulator: sends a random 51-bit word through bpsk_modulator at
// the full 40 kHz / 22-period timing and checks every output sample against
// the expected carrier (bit for the first half period, its complement for
// the second), the `next` strobe at each symbol end and the busy length of
// 51*22*50 cycles.
`timescale 1ns/1ps
module tb_bpsk_modulator;
  localparam int HALF = 25, PER = 22, NSYM = 51;
  logic clk = 0, rst_n = 0, start = 0, bit_i, carrier, next, busy;
  logic [NSYM-1:0] word;
  int idx = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bpsk_modulator dut (.clk, .rst_n, .start, .bit_i, .carrier, .next, .busy);

  assign bit_i = word[idx];
  always @(posedge clk) if (next) idx <= idx + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int t, bad, nnext, blen;
    word = {19'($urandom), $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(!busy, "idle after reset");
    for (int rep = 0; rep < 2; rep++) begin
      idx = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      bad = 0; nnext = 0; blen = 0;
      for (t = 0; t < NSYM * PER * 2 * HALF; t++) begin
        automatic int s = t / (PER * 2 * HALF);
        automatic int ph = t % (2 * HALF);
        automatic logic exp_c = (ph < HALF) ? word[s] : ~word[s];
        automatic logic exp_n = ((t + 1) % (PER * 2 * HALF)) == 0;
        if (!busy || carrier != exp_c || next != exp_n) bad++;
        if (next) nnext++;
        if (busy) blen++;
        @(negedge clk);
      end
      check(bad == 0, $sformatf("carrier/next mismatches %0d", bad));
      check(nnext == NSYM, $sformatf("next pulses %0d", nnext));
      check(blen == NSYM * PER * 2 * HALF && !busy, "busy lasts 56100 cycles");
      word = ~word;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
