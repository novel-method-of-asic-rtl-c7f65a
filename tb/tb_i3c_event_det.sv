// tb_i3c_event_det: random event pulses, enable masks and write-1-to-clear
// pulses against a reference model of the sticky pending bits and of irq;
// also checks that an event arriving in the clock it is cleared is kept.
`timescale 1ns/1ps
module tb_i3c_event_det;
  import i3c_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [N_EVENTS-1:0] ev = '0, int_en = '0, clr = '0, pending;
  logic irq;
  logic [N_EVENTS-1:0] model = '0;

  i3c_event_det dut (.clk, .rst_n, .ev, .int_en, .clr, .pending, .irq);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(pending == '0 && !irq, "reset state");
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      ev     = N_EVENTS'($urandom) & N_EVENTS'($urandom) & N_EVENTS'($urandom);
      clr    = N_EVENTS'($urandom) & N_EVENTS'($urandom);
      int_en = (n % 50 == 0) ? N_EVENTS'($urandom) : int_en;
      @(posedge clk);
      model = (model & ~clr) | ev;
      #1;
      check(pending == model, $sformatf("pending %b vs %b", pending, model));
      check(irq == |(model & int_en), "irq");
    end
    // set and clear in the same clock: the new event wins
    @(negedge clk);
    ev = 6'b000100; clr = 6'b000100; int_en = 6'b000100;
    @(negedge clk);
    ev = '0; clr = '0;
    check(pending[2] && irq, "event kept when cleared in the same clock");
    clr = 6'b111111;
    @(negedge clk);
    clr = '0;
    check(pending == '0 && !irq, "all cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
