// tb_info_packetizer: loads measured and fixed data into info_packetizer and
// reads the 51 bits back through `shift`, comparing them with a packet built
// by an independent CRC model (polynomial long division). Also checks that
// the first bit out is the CRC LSB and that load has priority over shift.
`timescale 1ns/1ps
module tb_info_packetizer;
  import plc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [R_ID-1:0] id; logic [R_V-1:0] v; logic [R_C-1:0] c;
  logic fixed_sel = 0, load = 0, shift = 0, bit_o;
  logic [PKT_LEN-1:0] packet;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  info_packetizer dut (.clk, .rst_n, .id, .v_meas(v), .c_meas(c), .fixed_sel,
                       .load, .shift, .bit_o, .packet);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [PKT_LEN-1:0] model(input logic [DATA_LEN-1:0] data);
    logic [PKT_LEN-1:0] r;
    r = {data, 21'b0};
    for (int i = PKT_LEN - 1; i >= 21; i--)
      if (r[i]) r[i -: 22] ^= 22'b1101100101011101010001;
    return {data, r[20:0]};
  endfunction

  task automatic send(input logic [DATA_LEN-1:0] exp_data);
    logic [PKT_LEN-1:0] got, exp_p;
    exp_p = model(exp_data);
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    check(packet == exp_p, $sformatf("packet %h expected %h", packet, exp_p));
    for (int k = 0; k < PKT_LEN; k++) begin
      got[k] = bit_o;
      @(negedge clk) shift = 1;
      @(negedge clk) shift = 0;
    end
    check(got == exp_p, $sformatf("serial %h expected %h", got, exp_p));
    check(got[0] == exp_p[0], "first bit is the CRC LSB");
  endtask

  initial begin
    id = '0; v = '0; c = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    id = 10'b1111100000; v = '0; c = '0;
    send({id, v, c});
    for (int n = 0; n < 20; n++) begin
      id = 10'($urandom); v = 10'($urandom); c = 10'($urandom);
      send({id, v, c});
    end
    fixed_sel = 1;
    send(FIXED_VECTOR);
    fixed_sel = 0;
    // load wins over shift
    id = 10'h155; v = 10'h0AA; c = 10'h3C3;
    @(negedge clk) begin load = 1; shift = 1; end
    @(negedge clk) begin load = 0; shift = 0; end
    check(packet == model({id, v, c}) && bit_o == model({id, v, c})[0], "load has priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
