// tb_i3c_ram: writes random bytes to every address of the data RAM, reads
// them back against a reference array, and checks the one-clock read latency
// and that a disabled cycle leaves the output register alone.
`timescale 1ns/1ps
module tb_i3c_ram;
  localparam int DEPTH = 256;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       en = 1'b0, we = 1'b0;
  logic [7:0] addr = '0, wdata = '0, rdata;
  logic [7:0] ref_mem [DEPTH];

  i3c_ram #(.DEPTH(DEPTH)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

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
    for (int i = 0; i < DEPTH; i++) begin
      ref_mem[i] = 8'($urandom);
      @(negedge clk);
      en = 1'b1; we = 1'b1; addr = 8'(i); wdata = ref_mem[i];
    end
    for (int i = DEPTH - 1; i >= 0; i--) begin
      @(negedge clk);
      en = 1'b1; we = 1'b0; addr = 8'(i);
      @(negedge clk);
      en = 1'b0;
      check(rdata == ref_mem[i], $sformatf("addr %0d: %h vs %h", i, rdata, ref_mem[i]));
    end
    // output holds while not enabled, and a write does not disturb it
    @(negedge clk);
    en = 1'b1; we = 1'b1; addr = 8'd0; wdata = ~ref_mem[0];
    @(negedge clk);
    en = 1'b0;
    check(rdata == ref_mem[0], "read register kept during write");
    @(negedge clk);
    en = 1'b1; we = 1'b0; addr = 8'd0;
    @(negedge clk);
    check(rdata == ~ref_mem[0], "rewritten byte");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
