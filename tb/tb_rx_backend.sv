// tb_rx_backend: the receiver back-end on its own. A BPSK source running
// 0.3% slower than the receiver sends random packets with both idle levels;
// 1-cycle spikes are added to the line at random times and slow idle-level
// changes are placed between packets. Every decoded packet must equal the
// word sent (except the documented case of a packet with no phase flip),
// each packet must be decoded exactly once, the 3-wire link must forward
// the same bits and PACK+STRT must pulse once per packet.
`timescale 1ns/1ps
module tb_rx_backend;
  localparam int NSYM = 51;
  logic tclk = 0, clk = 0, rst_n = 0;
  logic start_tx = 0, idle_level = 0, line, lbusy, vs;
  logic [NSYM-1:0] word = '0;
  logic pack_strt, bit_one, bit_zero, one_wire, pkt_valid, rx_abort, rx_locked, rx_case_b, si_busy, dropped;
  logic [NSYM-1:0] pkt;
  int checks = 0, failures = 0;
  always #250.75 tclk = ~tclk;
  always #250    clk  = ~clk;

  tb_bpsk_line src (.clk(tclk), .start(start_tx), .word, .idle_level, .line, .busy(lbusy));

  // spikes: invert the line for one receiver cycle now and then
  logic spike = 0;
  always @(posedge clk) spike <= ($urandom % 1500) == 0;
  assign vs = line ^ spike;

  rx_backend dut (.clk, .rst_n, .vs, .pack_strt, .bit_one, .bit_zero, .one_wire, .pkt,
                  .pkt_valid, .rx_abort, .rx_locked, .rx_case_b, .si_busy, .dropped);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [NSYM-1:0] sent_q[$];
  int nrx = 0, npack = 0, ncb = 0, nbits = 0;
  logic [NSYM-1:0] si_word, si_ref;
  logic p1 = 0, p0 = 0, pp = 0;
  always @(posedge clk) if (rst_n) begin
    p1 <= bit_one; p0 <= bit_zero; pp <= pack_strt;
    if (pkt_valid) begin
      nrx++;
      if (rx_case_b) ncb++;
      if (sent_q.size() == 0) check(0, "unexpected packet");
      else begin
        automatic logic [NSYM-1:0] e = sent_q.pop_front();
        check(pkt == e, $sformatf("pkt %h sent %h", pkt, e));
        si_ref = e;
      end
    end
    if (pack_strt && !pp) begin npack++; nbits = 0; end
    if ((bit_one && !p1) || (bit_zero && !p0)) begin
      si_word[nbits] = bit_one;
      nbits++;
      if (nbits == NSYM) check(si_word == si_ref, "3-wire bits");
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 8; n++) begin
      idle_level = n[0];
      repeat (3000) @(posedge tclk);
      word = {19'($urandom), $urandom};
      // A packet without any phase flip cannot show where its symbols start;
      // the receiver then reads it as case A. Sent on a high idle line, an
      // all-ones packet starts without an edge (case B), so it comes out
      // inverted.
      if (n == 7) word = {NSYM{1'b1}};
      sent_q.push_back((n == 7) ? ~word : word);
      @(negedge tclk) start_tx = 1;
      @(negedge tclk) start_tx = 0;
      @(negedge lbusy);
      repeat (200) @(posedge tclk);
      if (n[0]) begin idle_level = 0; repeat (3000) @(posedge tclk); idle_level = 1; end
    end
    @(negedge si_busy);
    repeat (10) @(posedge clk);
    check(nrx == 8 && sent_q.size() == 0, $sformatf("received %0d of 8", nrx));
    check(npack == 8, $sformatf("PACK+STRT %0d", npack));
    check(ncb > 0 && ncb < 8, "both phase cases seen");
    check(!dropped, "nothing dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
