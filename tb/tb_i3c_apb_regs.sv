// tb_i3c_apb_regs: APB accesses to the register block. Checks reset values,
// write/read-back of the configuration registers and their decoded outputs,
// the one-clock cmd_valid pulse with the decoded command, the status fields,
// table entries written from APB and from the central-controller port (which
// wins a same-clock collision), the IBI register, write-1-to-clear pulses to
// the event detector, pslverr on unmapped addresses, and the RAM window
// through a real RAM controller and RAM, including the read wait state.
`timescale 1ns/1ps
module tb_i3c_apb_regs;
  import i3c_pkg::*;
  localparam int N_DAT = 8;
  localparam int RAM_DEPTH = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              psel = 1'b0, penable = 1'b0, pwrite = 1'b0;
  logic [APB_AW-1:0] paddr = '0;
  logic [APB_DW-1:0] pwdata = '0, prdata;
  logic              pready, pslverr;
  logic ctrl_enable, ibi_accept, dis_on_nack, disec_all;
  logic [15:0] t_low, t_high;
  logic [7:0]  sda_offset, ccc_code;
  logic        cmd_valid;
  cmd_t        cmd;
  dat_entry_t  dat [N_DAT];
  logic        busy = 1'b0;
  logic [7:0]  byte_cnt = 8'h00, daa_cnt = 8'h00;
  logic        dat_we = 1'b0;
  logic [2:0]  dat_widx = '0;
  dat_entry_t  dat_wdata = '0;
  logic        ibi_we = 1'b0;
  logic [14:0] ibi_wdata = '0;
  logic [N_EVENTS-1:0] int_en, int_clr, int_pending = 6'b101010;
  logic        a_req, a_we, a_gnt, a_rvalid;
  logic [7:0]  a_addr, a_wdata, a_rdata;
  logic        m_en, m_we;
  logic [7:0]  m_addr, m_wdata, m_rdata, b_rdata;
  logic        b_gnt, b_rvalid;

  i3c_apb_regs #(.N_DAT(N_DAT), .RAM_DEPTH(RAM_DEPTH)) dut (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .ctrl_enable, .ibi_accept, .dis_on_nack, .disec_all, .t_low, .t_high, .sda_offset,
    .cmd_valid, .cmd, .ccc_code, .dat,
    .busy, .byte_cnt, .daa_cnt, .dat_we, .dat_widx, .dat_wdata, .ibi_we, .ibi_wdata,
    .int_en, .int_clr, .int_pending,
    .ram_req(a_req), .ram_we(a_we), .ram_addr(a_addr), .ram_wdata(a_wdata),
    .ram_gnt(a_gnt), .ram_rvalid(a_rvalid), .ram_rdata(a_rdata)
  );
  i3c_ram_ctrl #(.DEPTH(RAM_DEPTH)) rc (
    .clk, .rst_n,
    .a_req, .a_we, .a_addr, .a_wdata, .a_gnt, .a_rvalid, .a_rdata,
    .b_req(1'b0), .b_we(1'b0), .b_addr(8'h0), .b_wdata(8'h0), .b_gnt, .b_rvalid, .b_rdata,
    .ram_en(m_en), .ram_we(m_we), .ram_addr(m_addr), .ram_wdata(m_wdata), .ram_rdata(m_rdata)
  );
  i3c_ram #(.DEPTH(RAM_DEPTH)) ram (.clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata));

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

  int n_cmd = 0, n_wait = 0;
  cmd_t last_cmd;
  logic [N_EVENTS-1:0] clr_seen = '0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (cmd_valid) begin n_cmd++; last_cmd = cmd; end
      if (psel && penable && !pready) n_wait++;
      clr_seen |= int_clr;
    end
  end

  logic last_err;
  task automatic apb_write(input logic [11:0] a, input logic [31:0] d);
    @(posedge clk);
    psel <= 1'b1; pwrite <= 1'b1; paddr <= a; pwdata <= d; penable <= 1'b0;
    @(posedge clk);
    penable <= 1'b1;
    do @(posedge clk); while (!pready);
    last_err = pslverr;
    psel <= 1'b0; penable <= 1'b0; pwrite <= 1'b0;
    #1;
  endtask
  task automatic apb_read(input logic [11:0] a, output logic [31:0] d);
    @(posedge clk);
    psel <= 1'b1; pwrite <= 1'b0; paddr <= a; penable <= 1'b0;
    @(posedge clk);
    penable <= 1'b1;
    do @(posedge clk); while (!pready);
    d = prdata;
    last_err = pslverr;
    psel <= 1'b0; penable <= 1'b0;
  endtask

  logic [31:0] d;
  logic [7:0]  ref_b [16];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(t_low == 16'd8 && t_high == 16'd8 && sda_offset == 8'd2 && !ctrl_enable, "reset values");

    apb_write(REG_CTRL, 32'hF);
    check(ctrl_enable && ibi_accept && dis_on_nack && disec_all, "CTRL bits");
    apb_write(REG_CTRL, 32'h5);
    check(ctrl_enable && !ibi_accept && dis_on_nack && !disec_all, "CTRL bits 0101");
    apb_write(REG_SCL_TIME, 32'h0009_0011);
    check(t_low == 16'h11 && t_high == 16'h9, "SCL_TIME");
    apb_read(REG_SCL_TIME, d);
    check(d == 32'h0009_0011, "SCL_TIME readback");
    apb_write(REG_SDA_OFS, 32'h4);
    check(sda_offset == 8'h4, "SDA offset");
    apb_write(REG_CCC, 32'h81);
    apb_read(REG_CCC, d);
    check(ccc_code == 8'h81 && d == 32'h81, "CCC");
    apb_write(REG_INT_EN, 32'h2D);
    check(int_en == 6'h2D, "INT_EN");

    // command launch
    apb_write(REG_CMD, {8'h40, 8'h05, 3'b0, 1'b1, 1'b0, 7'h31, 4'(CMD_PRIV_READ)});
    repeat (3) @(posedge clk);
    #1;
    check(n_cmd == 1, "one cmd_valid pulse");
    check(last_cmd.ctype == CMD_PRIV_READ && last_cmd.addr == 7'h31 && last_cmd.length == 8'd5 &&
          last_cmd.ram_base == 8'h40 && last_cmd.hold_bus, "decoded command");

    // status
    busy = 1'b1; byte_cnt = 8'h12; daa_cnt = 8'h03;
    apb_read(REG_STATUS, d);
    check(d == 32'h0003_1201, $sformatf("STATUS %h", d));
    apb_read(REG_INT_STAT, d);
    check(d == 32'h2A, "INT_STAT shows pending events");
    clr_seen = '0;
    apb_write(REG_INT_STAT, 32'h0A);
    repeat (2) @(posedge clk);
    #1;
    check(clr_seen == 6'h0A, $sformatf("clear pulses %b", clr_seen));

    // device address table from APB and from the central controller
    for (int i = 0; i < N_DAT; i++) apb_write(REG_DAT_BASE + 12'(4*i), 32'h0000_0130 + 32'(i));
    for (int i = 0; i < N_DAT; i++) begin
      apb_read(REG_DAT_BASE + 12'(4*i), d);
      check(d == 32'h0000_0130 + 32'(i) && dat[i].dyn_addr == 7'h30 + 7'(i) && dat[i].valid,
            $sformatf("DAT %0d", i));
    end
    @(posedge clk);
    dat_we <= 1'b1; dat_widx <= 3'd5; dat_wdata <= 32'hAABB_0735;
    @(posedge clk);
    dat_we <= 1'b0;
    @(posedge clk);
    check(dat[5] == 32'hAABB_0735 && dat[5].bcr == 8'hBB && dat[5].assigned, "DAT write from central");
    // same-clock collision: central controller wins
    @(posedge clk);
    psel <= 1'b1; pwrite <= 1'b1; paddr <= REG_DAT_BASE + 12'd8; pwdata <= 32'h1111_0000; penable <= 1'b0;
    @(posedge clk);
    penable <= 1'b1;
    dat_we <= 1'b1; dat_widx <= 3'd2; dat_wdata <= 32'h2222_0000;
    @(posedge clk);
    dat_we <= 1'b0; psel <= 1'b0; penable <= 1'b0; pwrite <= 1'b0;
    @(posedge clk);
    check(dat[2] == 32'h2222_0000, "central write wins");

    // IBI register
    @(posedge clk);
    ibi_we <= 1'b1; ibi_wdata <= {7'h30, 8'hA5};
    @(posedge clk);
    ibi_we <= 1'b0;
    apb_read(REG_IBI, d);
    check(d == 32'h0000_B0A5, $sformatf("IBI %h", d));

    // unmapped address
    apb_read(12'h3F0, d);
    check(last_err == 1'b1, "pslverr on unmapped read");
    apb_read(REG_CTRL, d);
    check(last_err == 1'b0 && d == 32'h5, "no pslverr on CTRL");

    // RAM window
    n_wait = 0;
    for (int i = 0; i < 16; i++) begin
      ref_b[i] = 8'($urandom);
      apb_write(REG_RAM_BASE + 12'(4*(240 + i)), {24'hFFFFFF, ref_b[i]});
    end
    check(n_wait == 0, "RAM writes without wait states");
    for (int i = 0; i < 16; i++) begin
      apb_read(REG_RAM_BASE + 12'(4*(240 + i)), d);
      check(d == {24'h0, ref_b[i]}, $sformatf("RAM %0d = %h", 240 + i, d));
    end
    check(n_wait == 16, $sformatf("one wait state per RAM read (%0d)", n_wait));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
