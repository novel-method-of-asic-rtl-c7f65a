// tb_i3c_bus_action: checks the bus actions on a real bus driver.
// A monitor turns the SCL/SDA waveforms into symbols (START, STOP, data bits
// sampled at SCL rising edges); a responder pulls SDA low on chosen bits to
// play a target. Each action's symbols and reported results (rx_data, rx_ack,
// rx_t) are compared with the expected ones, including the odd-parity T bit,
// the ACK/NACK bit, repeated start, and the idle-bus start detection.
`timescale 1ns/1ps
module tb_i3c_bus_action;
  import i3c_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       act_valid = 1'b0;
  act_e       act = ACT_START;
  logic [7:0] act_tx = '0;
  logic       act_ack = 1'b0, act_od = 1'b1;
  logic       act_ready, act_done, rx_ack, rx_t, target_start;
  logic [7:0] rx_data;
  logic       scl_cmd_valid, scl_done, scl_level, scl_ready;
  scl_cmd_e   scl_cmd;
  logic       sda_cmd_valid, sda_value, sda_drive, sda_pp, sda_done, sda_sample, sda_in, scl_in;
  logic       sda_state, sda_tribuf_en, scl_state, scl_tribuf_en;
  logic       sda_bus, scl_bus, resp_low, force_low = 1'b0;

  assign scl_bus = scl_tribuf_en ? scl_state : 1'b1;
  assign sda_bus = (sda_tribuf_en ? sda_state : 1'b1) & !resp_low & !force_low;

  i3c_bus_action dut (
    .clk, .rst_n, .enable(1'b1),
    .act_valid, .act, .act_tx, .act_ack, .act_od, .act_ready, .act_done,
    .rx_data, .rx_ack, .rx_t, .target_start,
    .scl_cmd_valid, .scl_cmd, .scl_done, .scl_level,
    .sda_cmd_valid, .sda_value, .sda_drive, .sda_pp, .sda_done, .sda_sample, .sda_in
  );

  i3c_bus_driver drv (
    .clk, .rst_n, .enable(1'b1), .t_low(16'd6), .t_high(16'd5), .sda_offset(8'd3),
    .scl_cmd_valid, .scl_cmd, .scl_ready, .scl_done, .scl_level,
    .sda_cmd_valid, .sda_value, .sda_drive, .sda_pp, .sda_done, .sda_sample,
    .sda_in, .scl_in,
    .sda_state, .sda_tribuf_en, .sda_read(sda_bus),
    .scl_state, .scl_tribuf_en, .scl_read(scl_bus)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: 2 = START, 3 = STOP, 0/1 = bit
  int sym[$];
  logic scl_p = 1'b1, sda_p = 1'b1;
  always @(posedge clk) begin
    scl_p <= scl_bus;
    sda_p <= sda_bus;
    if (scl_bus && scl_p && sda_p && !sda_bus) sym.push_back(2);
    if (scl_bus && scl_p && !sda_p && sda_bus) sym.push_back(3);
    if (scl_bus && !scl_p) sym.push_back(int'(sda_bus));
  end

  // responder: pulls SDA low during the SCL low/high of bit k when pat[k]==0
  logic [8:0] pat = '1;
  int         nresp = 0;
  int         bitn = 0;
  always @(posedge clk) begin
    if (!scl_bus && scl_p) bitn <= bitn + 1;
  end
  assign resp_low = (bitn < nresp) && !pat[8 - bitn];

  task automatic do_act(input act_e a, input logic [7:0] tx, input logic ack, input logic od);
    @(posedge clk);
    while (!act_ready) @(posedge clk);
    act_valid <= 1'b1; act <= a; act_tx <= tx; act_ack <= ack; act_od <= od;
    @(posedge clk);
    act_valid <= 1'b0;
    while (!act_done) @(posedge clk);
    @(posedge clk);
  endtask

  task automatic expect_bits(input logic [8:0] v, input int n, input string what);
    bit ok;
    ok = (sym.size() == n);
    for (int k = 0; k < n && ok; k++) ok = (sym[k] == int'(v[n-1-k]));
    check(ok, $sformatf("%s: %p", what, sym));
    sym.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(!target_start, "no start on an idle bus");
    sym.delete();   // drop the SCL rise seen when reset first takes hold

    do_act(ACT_START, 8'h00, 1'b0, 1'b1);
    check(sym.size() == 1 && sym[0] == 2, $sformatf("START symbol: %p", sym));
    sym.delete();

    // address 7E/W, target acknowledges on the 9th bit
    bitn = 0; nresp = 9; pat = 9'b1_1111_1110;
    do_act(ACT_TX_ACK, 8'hFC, 1'b0, 1'b1);
    expect_bits({8'hFC, 1'b0}, 9, "7E/W + ACK");
    check(rx_ack == 1'b1, "ACK reported");

    // no target answers
    bitn = 0; nresp = 0;
    do_act(ACT_TX_ACK, 8'h44, 1'b0, 1'b1);
    expect_bits({8'h44, 1'b1}, 9, "NACKed byte");
    check(rx_ack == 1'b0, "NACK reported");

    // write byte + T: odd parity
    for (int v = 0; v < 4; v++) begin
      logic [7:0] b;
      b = 8'($urandom);
      do_act(ACT_TX_T, b, 1'b0, 1'b0);
      expect_bits({b, ~(^b)}, 9, $sformatf("byte %h + T", b));
    end

    // read byte + T from the responder
    bitn = 0; nresp = 9; pat = {8'hA6, 1'b0};
    do_act(ACT_RX_T, 8'h00, 1'b0, 1'b0);
    expect_bits({8'hA6, 1'b0}, 9, "read A6 + T");
    check(rx_data == 8'hA6 && rx_t == 1'b0, $sformatf("rx %h t %b", rx_data, rx_t));
    bitn = 0; nresp = 9; pat = {8'h3B, 1'b1};
    do_act(ACT_RX_T, 8'h00, 1'b0, 1'b0);
    check(rx_data == 8'h3B && rx_t == 1'b1, $sformatf("rx %h t %b", rx_data, rx_t));
    sym.delete();

    // 8-bit read, then ACK and NACK
    bitn = 0; nresp = 8; pat = {8'h5C, 1'b1};
    do_act(ACT_RX, 8'h00, 1'b0, 1'b1);
    expect_bits({1'b0, 8'h5C}, 8, "read 5C");
    check(rx_data == 8'h5C, "rx 5C");
    bitn = 0; nresp = 0;
    do_act(ACT_ACK, 8'h00, 1'b1, 1'b1);
    expect_bits(9'b0, 1, "ACK bit");
    do_act(ACT_ACK, 8'h00, 1'b0, 1'b1);
    expect_bits(9'b1, 1, "NACK bit");

    // repeated start then stop
    do_act(ACT_RSTART, 8'h00, 1'b0, 1'b1);
    // SCL rises with SDA released, then SDA falls while SCL is high
    check(sym.size() == 2 && sym[0] == 1 && sym[1] == 2, $sformatf("Sr symbol %p", sym));
    sym.delete();
    do_act(ACT_STOP, 8'h00, 1'b0, 1'b1);
    // SCL rises with SDA low, then SDA rises while SCL is high
    check(sym.size() == 2 && sym[0] == 0 && sym[1] == 3, $sformatf("STOP symbol %p", sym));
    sym.delete();
    check(scl_bus && sda_bus, "bus idle after STOP");

    // a target pulls SDA low on the idle bus
    force_low = 1'b1;
    repeat (4) @(posedge clk);
    check(target_start, "target start seen");
    force_low = 1'b0;
    repeat (4) @(posedge clk);
    check(!target_start, "target start gone");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
