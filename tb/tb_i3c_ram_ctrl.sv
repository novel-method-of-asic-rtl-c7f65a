// tb_i3c_ram_ctrl: two requesters share the RAM through the RAM controller.
// Port A (CPU side) must always be granted at once; port B only when A is
// quiet, and it must keep its request until granted. Random traffic on both
// ports is checked against a reference memory, including the one-clock read
// latency, and the number of clocks B waited behind A is checked.
`timescale 1ns/1ps
module tb_i3c_ram_ctrl;
  localparam int DEPTH = 64;
  localparam int AW = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          a_req = 1'b0, a_we = 1'b0, b_req = 1'b0, b_we = 1'b0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [7:0]    a_wdata = '0, b_wdata = '0;
  logic          a_gnt, a_rvalid, b_gnt, b_rvalid;
  logic [7:0]    a_rdata, b_rdata;
  logic          m_en, m_we;
  logic [AW-1:0] m_addr;
  logic [7:0]    m_wdata, m_rdata;

  i3c_ram_ctrl #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n,
    .a_req, .a_we, .a_addr, .a_wdata, .a_gnt, .a_rvalid, .a_rdata,
    .b_req, .b_we, .b_addr, .b_wdata, .b_gnt, .b_rvalid, .b_rdata,
    .ram_en(m_en), .ram_we(m_we), .ram_addr(m_addr), .ram_wdata(m_wdata), .ram_rdata(m_rdata)
  );
  i3c_ram #(.DEPTH(DEPTH)) ram (.clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata));

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

  logic [7:0] ref_mem [DEPTH];
  logic       a_pend_rd = 1'b0, b_pend_rd = 1'b0;
  logic [7:0] a_exp, b_exp;
  int         b_wait = 0, b_wait_max = 0, collisions = 0;

  // scoreboard on the clock edge
  always @(posedge clk) if (rst_n) begin
    if (a_pend_rd) begin
      check(a_rvalid && a_rdata == a_exp, $sformatf("A read %h vs %h", a_rdata, a_exp));
    end
    if (b_pend_rd) begin
      check(b_rvalid && b_rdata == b_exp, $sformatf("B read %h vs %h", b_rdata, b_exp));
    end
    a_pend_rd <= 1'b0;
    b_pend_rd <= 1'b0;
    if (a_req) begin
      check(a_gnt, "A granted at once");
      check(!b_gnt, "B not granted with A");
      if (b_req) collisions++;
      if (a_we) ref_mem[a_addr] <= a_wdata;
      else begin a_pend_rd <= 1'b1; a_exp <= ref_mem[a_addr]; end
    end else if (b_req) begin
      check(b_gnt, "B granted when A is quiet");
      if (b_we) ref_mem[b_addr] <= b_wdata;
      else begin b_pend_rd <= 1'b1; b_exp <= ref_mem[b_addr]; end
    end
    if (b_req && !b_gnt) b_wait <= b_wait + 1;
    else begin
      if (b_wait > b_wait_max) b_wait_max <= b_wait;
      b_wait <= 0;
    end
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // clear the RAM through port A
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_req = 1'b1; a_we = 1'b1; a_addr = AW'(i); a_wdata = '0;
    end
    @(negedge clk);
    a_req = 1'b0;
    // random traffic; B holds its request until granted
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (!b_req || b_gnt) begin
        b_req   = ($urandom % 3) != 0;
        b_we    = 1'($urandom % 2);
        b_addr  = AW'($urandom);
        b_wdata = 8'($urandom);
      end
      a_req   = ($urandom % 4) == 0 || (n > 1000 && n < 1010);
      a_we    = 1'($urandom % 2);
      a_addr  = AW'($urandom);
      a_wdata = 8'($urandom);
      #1;
    end
    @(negedge clk);
    a_req = 1'b0; b_req = 1'b0;
    repeat (3) @(posedge clk);
    check(collisions > 50, $sformatf("collisions %0d", collisions));
    check(b_wait_max >= 9, $sformatf("B waited up to %0d clocks behind A", b_wait_max));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
