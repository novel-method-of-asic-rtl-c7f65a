// tb_i3c_bus_driver: checks the SCL and SDA controllers of the bus driver.
// Measures SCL low/high times of SCL_CLOCK bits against t_low/t_high, the
// SDA change delay against sda_offset (counted from the SCL falling edge),
// open-drain versus push-pull buffer enables, SCL_HIGH hold time, sampling of
// SDA at the end of the high phase, and the enable input.
`timescale 1ns/1ps
module tb_i3c_bus_driver;
  import i3c_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        enable = 1'b0;
  logic [15:0] t_low = 16'd7, t_high = 16'd4;
  logic [7:0]  sda_offset = 8'd5;
  logic        scl_cmd_valid = 1'b0;
  scl_cmd_e    scl_cmd = SCL_HIGH;
  logic        scl_ready, scl_done, scl_level;
  logic        sda_cmd_valid = 1'b0, sda_value = 1'b1, sda_drive = 1'b0, sda_pp = 1'b0;
  logic        sda_done, sda_sample, sda_in, scl_in;
  logic        sda_state, sda_tribuf_en, scl_state, scl_tribuf_en;
  logic        ext_low = 1'b0;
  logic        sda_bus;

  assign sda_bus = (sda_tribuf_en ? sda_state : 1'b1) & !ext_low;

  i3c_bus_driver dut (
    .clk, .rst_n, .enable, .t_low, .t_high, .sda_offset,
    .scl_cmd_valid, .scl_cmd, .scl_ready, .scl_done, .scl_level,
    .sda_cmd_valid, .sda_value, .sda_drive, .sda_pp, .sda_done, .sda_sample, .sda_in, .scl_in,
    .sda_state, .sda_tribuf_en, .sda_read(sda_bus),
    .scl_state, .scl_tribuf_en, .scl_read(scl_state)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // edge timestamps (in clocks)
  int cyc = 0, t_fall = 0, t_rise = 0, t_sda = 0, lo_len = 0, hi_len = 0;
  logic scl_p = 1'b1, sda_p = 1'b1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    scl_p <= scl_state;
    sda_p <= sda_bus;
    if (!scl_state && scl_p) begin t_fall <= cyc; hi_len <= cyc - t_rise; end
    if (scl_state && !scl_p) begin t_rise <= cyc; lo_len <= cyc - t_fall; end
    if (sda_bus != sda_p) t_sda <= cyc;
  end

  task automatic scl(input scl_cmd_e c);
    @(posedge clk);
    while (!scl_ready) @(posedge clk);
    scl_cmd_valid <= 1'b1; scl_cmd <= c;
    @(posedge clk);
    scl_cmd_valid <= 1'b0;
    while (!scl_done) @(posedge clk);
  endtask

  task automatic bit_out(input logic v, input logic drv, input logic pp);
    @(posedge clk);
    while (!scl_ready) @(posedge clk);
    scl_cmd_valid <= 1'b1; scl_cmd <= SCL_CLOCK;
    sda_cmd_valid <= 1'b1; sda_value <= v; sda_drive <= drv; sda_pp <= pp;
    @(posedge clk);
    scl_cmd_valid <= 1'b0; sda_cmd_valid <= 1'b0;
    while (!scl_done) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(scl_tribuf_en == 1'b0 && sda_tribuf_en == 1'b0, "released while disabled");
    enable = 1'b1;
    @(posedge clk);
    check(scl_state == 1'b1 && scl_tribuf_en == 1'b1, "SCL idles high");

    // start-like sequence: SDA low with SCL high is immediate
    @(posedge clk);
    sda_cmd_valid <= 1'b1; sda_value <= 1'b0; sda_drive <= 1'b1; sda_pp <= 1'b0;
    @(posedge clk);
    sda_cmd_valid <= 1'b0;
    while (!sda_done) @(posedge clk);
    check(sda_bus == 1'b0 && sda_tribuf_en, "SDA pulled low while SCL high");
    begin
      int t0;
      t0 = cyc;
      scl(SCL_HIGH);
      check(cyc - t0 >= int'(t_high), $sformatf("SCL_HIGH hold %0d", cyc - t0));
    end
    scl(SCL_LOW);
    check(scl_state == 1'b0, "SCL low");

    // a byte of bits, push-pull, with measured timing
    for (int k = 0; k < 8; k++) begin
      bit_out(k[0], 1'b1, 1'b1);
      if (k > 0) begin
        check(lo_len == int'(t_low), $sformatf("bit %0d low time %0d", k, lo_len));
        check(t_sda - t_fall == int'(sda_offset),
              $sformatf("bit %0d SDA offset %0d", k, t_sda - t_fall));
      end
      @(posedge clk);
      check(hi_len == int'(t_high), $sformatf("bit %0d high time %0d", k, hi_len));
      check(sda_sample == k[0], $sformatf("bit %0d sampled %0b", k, sda_sample));
      check(sda_tribuf_en == 1'b1, "push-pull drives both levels");
    end

    // open drain: a 1 releases the buffer
    bit_out(1'b1, 1'b1, 1'b0);
    check(sda_tribuf_en == 1'b0, "open-drain high is released");
    bit_out(1'b0, 1'b1, 1'b0);
    check(sda_tribuf_en == 1'b1 && sda_state == 1'b0, "open-drain low is driven");
    // released line read back from another driver
    ext_low = 1'b1;
    bit_out(1'b1, 1'b0, 1'b0);
    check(sda_sample == 1'b0, "sample sees an external low");
    ext_low = 1'b0;
    bit_out(1'b1, 1'b0, 1'b0);
    check(sda_sample == 1'b1, "sample sees the pull-up");

    // another timing point
    t_low = 16'd12; t_high = 16'd9; sda_offset = 8'd8;
    bit_out(1'b0, 1'b1, 1'b1);
    bit_out(1'b1, 1'b1, 1'b1);
    check(lo_len == 12, $sformatf("low time %0d", lo_len));
    check(t_sda - t_fall == 8, $sformatf("SDA offset %0d", t_sda - t_fall));
    @(posedge clk);
    check(hi_len == 9, $sformatf("high time %0d", hi_len));

    enable = 1'b0;
    @(posedge clk); @(posedge clk);
    check(scl_tribuf_en == 1'b0 && sda_tribuf_en == 1'b0, "disable releases both lines");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
