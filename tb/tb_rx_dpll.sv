// tb_rx_dpll: feeds rx_dpll with BPSK packets from a source clocked 0.2%
// slower than the receiver. For the four combinations of line idle level and
// first bit it checks that the packet qualifies, that exactly NSYM symbol
// ends and one `done` occur, that `done` falls at the end of the packet on
// the line (half a carrier period later in case B), that `case_b` is right,
// and that while locked every line edge is within 3 cycles of a reference
// edge. Slow edges (a 50 Hz wave) must be rejected with `cand_drop`.
`timescale 1ns/1ps
module tb_rx_dpll;
  localparam int NSYM = 51;
  logic tclk = 0, clk = 0, rst_n = 0;
  logic start_tx = 0, idle_level = 0, line, lbusy;
  logic [NSYM-1:0] word = '0;
  logic sig = 0, sig_d = 0, edge_i;
  logic ref_o, active, locked, start, sym_end, done, cand_drop, lvl0, case_b, rev_seen;
  int checks = 0, failures = 0;
  always #250   tclk = ~tclk;
  always #249.5 clk  = ~clk;

  tb_bpsk_line src (.clk(tclk), .start(start_tx), .word, .idle_level, .line, .busy(lbusy));

  always @(posedge clk) begin sig <= line; sig_d <= sig; end
  assign edge_i = sig ^ sig_d;

  rx_dpll dut (.clk, .rst_n, .sig, .edge_i, .ref_o, .active, .locked, .start, .sym_end,
               .done, .cand_drop, .lvl0, .case_b, .rev_seen);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int nsym = 0, ndone = 0, ndrop = 0, bad_lock = 0, nlock_edges = 0;
  realtime t_done;
  logic cb_at_done = 0, l0_at_done = 0;   // sampled at done: a new candidate may follow
  logic ref_d = 0;
  int since_ref = 100;
  always @(posedge clk) if (rst_n) begin
    if (sym_end) nsym++;
    if (done) begin ndone++; t_done = $realtime; cb_at_done = case_b; l0_at_done = lvl0; end
    if (cand_drop) ndrop++;
  end
  // distance from each locked line edge to the nearest reference edge
  int last_ref_edge = -100, last_line_edge = -100, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    ref_d <= ref_o;
    if (ref_o != ref_d) begin
      last_ref_edge = cyc;
      if (locked && cyc - last_line_edge > 3 && cyc - last_line_edge < 20) bad_lock++;
    end
    if (edge_i && locked) begin
      last_line_edge = cyc;
      nlock_edges++;
    end
  end

  task automatic packet(input logic idle, input logic first);
    realtime t_end;
    idle_level = idle;
    word = {19'($urandom), $urandom};
    word[0] = first;
    word[1] = ~first;     // at least one phase flip
    repeat (200) @(posedge tclk);
    nsym = 0; ndone = 0;
    @(negedge tclk) start_tx = 1;
    @(negedge tclk) start_tx = 0;
    @(negedge lbusy); t_end = $realtime;
    repeat (200) @(posedge tclk);
    check(nsym == NSYM && ndone == 1, $sformatf("symbols %0d done %0d", nsym, ndone));
    check(cb_at_done == (idle == first), $sformatf("idle %0d first %0d case_b %0d", idle, first, cb_at_done));
    check(l0_at_done == ~idle, $sformatf("lvl0 %0d after idle %0d first %0d", l0_at_done, idle, first));
    begin
      automatic realtime expect_t = t_end + ((idle == first) ? 12_500.0 : 0.0);
      automatic realtime diff = t_done - expect_t;
      check(diff > -4000.0 && diff < 4000.0, $sformatf("done %0t vs %0t", t_done, expect_t));
    end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (100) @(posedge clk);
    for (int rep = 0; rep < 2; rep++)
      for (int m = 0; m < 4; m++) packet(m[0], m[1]);
    check(bad_lock == 0 && nlock_edges > 1000, $sformatf("lock error edges %0d of %0d", bad_lock, nlock_edges));
    // slow 50 Hz-like edges are rejected
    ndrop = 0;
    for (int i = 0; i < 6; i++) begin
      idle_level = ~idle_level;
      repeat (2000) @(posedge tclk);
      check(!locked, "slow edges never lock");
    end
    check(ndrop == 6, $sformatf("candidates dropped %0d", ndrop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
