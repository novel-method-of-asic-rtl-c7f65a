// tb_i3c_controller_top: end-to-end test of the I3C controller.
//
// The controller, programmed over APB by tasks that play the CPU, runs a bus
// shared with two I3C targets and one legacy I2C target (behavioural models).
// The bus is a wired-AND of the enabled drivers with a pull-up: a released
// line reads 1. Sequence:
//   dynamic address assignment of both I3C targets (arbitration by PID, the
//   lower PID wins and gets the first free table address), private write,
//   private read ended by the target's T bit, I2C write and read, broadcast
//   CCC, a write to an absent address (NACK), an accepted in-band interrupt,
//   a rejected one followed by direct DISEC, a command that keeps the bus so
//   the next command starts with a repeated start, an IBI while a command
//   waits (the bus is kept and the command follows with a repeated start),
//   a read that runs past the end of the RAM (overflow), and an IBI refused
//   because IBIs are turned off, followed by broadcast DISEC.
//   Each result is compared with values worked out here from the stimulus,
//   and each mechanism is counted; one that never happened is a failure.
//   Bit timing is checked too: one SCL period must be T_LOW + T_HIGH clocks,
//   and each SDA change inside a byte must come SDA_OFS clocks after SCL
//   falls.
// All controller parameters stay at their defaults.
`timescale 1ns/1ps
module tb_i3c_controller_top;
  import i3c_pkg::*;

  localparam int T_LOW  = 6;
  localparam int T_HIGH = 5;
  localparam int SDA_OFS = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              psel = 1'b0, penable = 1'b0, pwrite = 1'b0;
  logic [APB_AW-1:0] paddr = '0;
  logic [APB_DW-1:0] pwdata = '0;
  logic [APB_DW-1:0] prdata;
  logic              pready, pslverr, irq;
  logic sda_state, sda_tribuf_en, scl_state, scl_tribuf_en;
  logic sda_bus, scl_bus;
  logic t1_low, t2_low, t3_low;
  logic ibi1 = 1'b0, ibi2 = 1'b0;

  i3c_controller_top dut (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .irq, .sda_state, .sda_tribuf_en, .sda_read(sda_bus),
    .scl_state, .scl_tribuf_en, .scl_read(scl_bus)
  );

  // wired bus with pull-ups
  assign scl_bus = scl_tribuf_en ? scl_state : 1'b1;
  assign sda_bus = (sda_tribuf_en ? sda_state : 1'b1) & !t1_low & !t2_low & !t3_low;

  // target A has the lower PID, so it wins DAA arbitration first
  i3c_target_model #(.PID(48'h0123_4567_0001), .BCR(8'h06), .DCR(8'h44), .IBI_DATA(8'hA5)) tA (
    .clk, .scl(scl_bus), .sda(sda_bus), .sda_low(t1_low), .ibi_req(ibi1),
    .rd_len(8'd3), .rd_base(8'h90));
  i3c_target_model #(.PID(48'h0123_4567_8002), .BCR(8'h06), .DCR(8'h55), .IBI_DATA(8'h5A)) tB (
    .clk, .scl(scl_bus), .sda(sda_bus), .sda_low(t2_low), .ibi_req(ibi2),
    .rd_len(8'd3), .rd_base(8'hC0));
  i3c_target_model #(.IS_I2C(1'b1), .STATIC_ADDR(7'h50)) tI2C (
    .clk, .scl(scl_bus), .sda(sda_bus), .sda_low(t3_low), .ibi_req(1'b0),
    .rd_len(8'd8), .rd_base(8'h20));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ APB master
  logic last_err = 1'b0;
  task automatic apb_write(input logic [11:0] a, input logic [31:0] d);
    @(posedge clk);
    psel <= 1'b1; pwrite <= 1'b1; paddr <= a; pwdata <= d; penable <= 1'b0;
    @(posedge clk);
    penable <= 1'b1;
    do @(posedge clk); while (!pready);
    psel <= 1'b0; penable <= 1'b0; pwrite <= 1'b0;
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

  function automatic logic [31:0] mk_cmd(cmd_type_e t, logic [6:0] a, logic [7:0] len,
                                         logic [7:0] base, logic hold);
    cmd_t c;
    c = '0;
    c.ctype = t; c.addr = a; c.length = len; c.ram_base = base; c.hold_bus = hold;
    return 32'(c);
  endfunction

  // wait for CMD_DONE, return and clear the pending events
  task automatic wait_done(output logic [31:0] ev);
    logic [31:0] s;
    int n = 0;
    do begin
      repeat (20) @(posedge clk);
      apb_read(REG_INT_STAT, s);
      n++;
    end while (!s[EV_CMD_DONE] && n < 2000);
    apb_read(REG_INT_STAT, ev);
    apb_write(REG_INT_STAT, ev);
  endtask

  task automatic wait_event(input int bitn, output logic [31:0] ev);
    logic [31:0] s;
    int n = 0;
    do begin
      repeat (20) @(posedge clk);
      apb_read(REG_INT_STAT, s);
      n++;
    end while (!s[bitn] && n < 2000);
    apb_read(REG_INT_STAT, ev);
    apb_write(REG_INT_STAT, ev);
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_rstart_next = 0, n_ibi_ok = 0, n_ibi_rej = 0, n_disec = 0, n_overflow = 0;
  int n_addr_nack = 0, n_daa_arb = 0, n_t_end = 0, n_disec_b = 0, n_ibi_hold = 0;
  always @(posedge clk) begin
    if (dut.u_central.st == dut.u_central.P_START && dut.u_central.act_valid &&
        dut.u_central.bus_held) n_rstart_next++;
    if (dut.u_central.events[EV_OVERFLOW]) n_overflow++;
    if (dut.u_central.events[EV_NACK]) n_addr_nack++;
    if (dut.u_central.st == dut.u_central.I_DISEC && dut.u_central.act_valid) begin
      if (dut.u_central.disec_all) n_disec_b++; else n_disec++;
    end
  end

  // SCL period measurement: clocks between successive rising edges inside a byte
  int scl_hi_run = 0, scl_lo_run = 0, per_ok = 0, per_bad = 0;
  logic scl_prev = 1'b1;
  always @(posedge clk) begin
    scl_prev <= scl_bus;
    if (scl_bus) scl_hi_run <= scl_prev ? scl_hi_run + 1 : 1;
    else         scl_lo_run <= !scl_prev ? scl_lo_run + 1 : 1;
    // at a rising edge check the low time just ended (data bits only)
    if (scl_bus && !scl_prev && dut.u_action.st == dut.u_action.A_BIT_WAIT &&
        dut.u_action.bidx != 0) begin
      if (scl_lo_run == T_LOW) per_ok++; else per_bad++;
    end
    if (!scl_bus && scl_prev && dut.u_action.st == dut.u_action.A_BIT_WAIT) begin
      if (scl_hi_run == T_HIGH) per_ok++; else per_bad++;
    end
  end

  // SDA offset: clocks from the SCL fall to each change of the controller's
  // SDA drive inside a byte, which must be the programmed offset
  int ofs_ok = 0, ofs_bad = 0;
  logic sda_drv_prev = 1'b0;
  always @(posedge clk) begin
    sda_drv_prev <= sda_tribuf_en && !sda_state;
    if ((sda_tribuf_en && !sda_state) != sda_drv_prev && !scl_bus && !scl_prev &&
        dut.u_action.st == dut.u_action.A_BIT_WAIT) begin
      if (scl_lo_run == SDA_OFS) ofs_ok++; else ofs_bad++;
    end
  end

  // push-pull high from the controller while a target pulls low
  int conflicts = 0;
  always @(posedge clk)
    if (rst_n && sda_tribuf_en && sda_state && (t1_low || t2_low || t3_low)) conflicts++;

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ test
  logic [31:0] d, ev;
  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    apb_write(REG_SCL_TIME, {16'(T_HIGH), 16'(T_LOW)});
    apb_write(REG_SDA_OFS, 32'(SDA_OFS));
    apb_write(REG_INT_EN, 32'h3F);
    apb_write(REG_CTRL, 32'b0111);    // enable, accept IBIs, DISEC on NACK (direct)
    apb_read(REG_SCL_TIME, d);
    check(d == {16'(T_HIGH), 16'(T_LOW)}, "SCL_TIME readback");
    // table: 0x30 and 0x31 free, 0x32 free as well; 0x30 may interrupt, 0x31 not
    apb_write(REG_DAT_BASE + 0, 32'h0000_0330);   // valid, ibi_en, 0x30
    apb_write(REG_DAT_BASE + 4, 32'h0000_0131);   // valid, 0x31
    apb_write(REG_DAT_BASE + 8, 32'h0000_0132);   // valid, 0x32
    apb_read(12'hFF0, d);
    check(last_err == 1'b1, "unmapped address answers with pslverr");
    apb_read(REG_CTRL, d);
    check(last_err == 1'b0 && d == 32'h7, "CTRL readback without error");

    // ---------------------------------------------- DAA
    apb_write(REG_CMD, mk_cmd(CMD_DAA, 7'h0, 8'd0, 8'h80, 1'b0));
    wait_done(ev);
    check(ev[EV_DAA_DONE], "DAA done event");
    check(!ev[EV_NACK], "DAA without error");
    check(tA.dyn_valid && tA.dyn_addr == 7'h30, $sformatf("target A address %h", tA.dyn_addr));
    check(tB.dyn_valid && tB.dyn_addr == 7'h31, $sformatf("target B address %h", tB.dyn_addr));
    check(tB.daa_lost >= 1, "target B lost arbitration once");
    n_daa_arb = tB.daa_lost;
    apb_read(REG_STATUS, d);
    check(d[23:16] == 8'd2, $sformatf("DAA count %0d", d[23:16]));
    apb_read(REG_DAT_BASE + 0, d);
    check(d == {8'h44, 8'h06, 5'h0, 3'b111, 1'b0, 7'h30}, $sformatf("DAT0 %h", d));
    apb_read(REG_DAT_BASE + 4, d);
    check(d == {8'h55, 8'h06, 5'h0, 3'b101, 1'b0, 7'h31}, $sformatf("DAT1 %h", d));
    apb_read(REG_DAT_BASE + 8, d);
    check(d[10] == 1'b0, "DAT2 not assigned");
    // PID bytes of target A at 0x80.., target B at 0x88..
    begin
      automatic logic [63:0] ea = {48'h0123_4567_0001, 8'h06, 8'h44};
      automatic logic [63:0] eb = {48'h0123_4567_8002, 8'h06, 8'h55};
      for (int k = 0; k < 8; k++) begin
        apb_read(REG_RAM_BASE + 12'(4*(32'h80 + k)), d);
        check(d[7:0] == ea[63-8*k -: 8], $sformatf("PID A byte %0d = %h", k, d[7:0]));
        apb_read(REG_RAM_BASE + 12'(4*(32'h88 + k)), d);
        check(d[7:0] == eb[63-8*k -: 8], $sformatf("PID B byte %0d = %h", k, d[7:0]));
      end
    end

    // ---------------------------------------------- private write
    for (int k = 0; k < 4; k++) apb_write(REG_RAM_BASE + 12'(4*k), 32'(8'h11 * (k + 1)));
    apb_write(REG_CMD, mk_cmd(CMD_PRIV_WRITE, 7'h30, 8'd4, 8'h00, 1'b0));
    wait_done(ev);
    check(!ev[EV_NACK], "private write acknowledged");
    check(tA.wr_cnt == 4, $sformatf("target A got %0d bytes", tA.wr_cnt));
    for (int k = 0; k < 4; k++)
      check(tA.mem[k] == 8'(8'h11 * (k + 1)), $sformatf("target A byte %0d", k));
    check(tA.parity_err == 0 && tB.parity_err == 0, "T-bit parity");
    check(tB.wr_cnt == 0, "target B untouched");

    // ---------------------------------------------- private read, ended by T = 0
    apb_write(REG_CMD, mk_cmd(CMD_PRIV_READ, 7'h31, 8'd8, 8'h10, 1'b0));
    wait_done(ev);
    apb_read(REG_STATUS, d);
    check(d[15:8] == 8'd3, $sformatf("private read length %0d", d[15:8]));
    if (d[15:8] == 8'd3) n_t_end++;
    for (int k = 0; k < 3; k++) begin
      apb_read(REG_RAM_BASE + 12'(4*(32'h10 + k)), d);
      check(d[7:0] == 8'hC0 + 8'(k), $sformatf("read byte %0d = %h", k, d[7:0]));
    end

    // ---------------------------------------------- I2C write and read
    apb_write(REG_RAM_BASE + 12'(4*8'h20), 32'h3C);
    apb_write(REG_RAM_BASE + 12'(4*8'h21), 32'hC3);
    apb_write(REG_CMD, mk_cmd(CMD_I2C_WRITE, 7'h50, 8'd2, 8'h20, 1'b0));
    wait_done(ev);
    check(!ev[EV_NACK], "I2C write acknowledged");
    check(tI2C.wr_cnt == 2 && tI2C.mem[0] == 8'h3C && tI2C.mem[1] == 8'hC3, "I2C write data");
    apb_write(REG_CMD, mk_cmd(CMD_I2C_READ, 7'h50, 8'd4, 8'h30, 1'b0));
    wait_done(ev);
    check(tI2C.rd_cnt == 4, $sformatf("I2C target sent %0d bytes", tI2C.rd_cnt));
    for (int k = 0; k < 4; k++) begin
      apb_read(REG_RAM_BASE + 12'(4*(32'h30 + k)), d);
      check(d[7:0] == 8'h20 + 8'(k), $sformatf("I2C read byte %0d = %h", k, d[7:0]));
    end

    // ---------------------------------------------- broadcast CCC with one data byte
    apb_write(REG_CCC, 32'h00);                 // ENEC
    apb_write(REG_RAM_BASE + 12'(4*8'h40), 32'h01);
    apb_write(REG_CMD, mk_cmd(CMD_CCC_BCAST, 7'h0, 8'd1, 8'h40, 1'b0));
    wait_done(ev);
    check(tA.last_ccc == 8'h00 && tB.last_ccc == 8'h00, "CCC code seen by both targets");
    check(tA.last_ccc_data == 8'h01 && tB.last_ccc_data == 8'h01, "CCC data byte");
    check(tA.wr_cnt == 4, "CCC data not taken as private data");

    // ---------------------------------------------- NACK from an absent address
    apb_write(REG_CMD, mk_cmd(CMD_I2C_WRITE, 7'h22, 8'd1, 8'h00, 1'b0));
    wait_done(ev);
    check(ev[EV_NACK], "address NACK reported");
    apb_read(REG_STATUS, d);
    check(d[0] == 1'b0, "idle after NACK");

    // ---------------------------------------------- accepted IBI
    ibi1 = 1'b1;
    wait_event(EV_IBI, ev);
    ibi1 = 1'b0;
    repeat (3) @(posedge clk);
    check(ev[EV_IBI], "IBI event");
    check(irq == 1'b0, "irq cleared");
    apb_read(REG_IBI, d);
    check(d[15:0] == {1'b1, 7'h30, 8'hA5}, $sformatf("IBI register %h", d[15:0]));
    check(tA.ibi_acked == 1, "target A IBI acknowledged");
    n_ibi_ok = tA.ibi_acked;
    repeat (100) @(posedge clk);

    // ---------------------------------------------- rejected IBI -> direct DISEC
    ibi2 = 1'b1;
    wait_event(EV_IBI_REJECT, ev);
    repeat (1500) @(posedge clk);
    ibi2 = 1'b0;
    check(ev[EV_IBI_REJECT], "IBI reject event");
    check(tB.ibi_nacked == 1, $sformatf("target B IBI NACKed %0d", tB.ibi_nacked));
    check(tB.ibi_disabled, "target B interrupts disabled by DISEC");
    check(!tA.ibi_disabled, "target A interrupts still enabled");
    n_ibi_rej = tB.ibi_nacked;
    apb_read(REG_STATUS, d);
    check(d[0] == 1'b0, "idle after rejected IBI");

    // ---------------------------------------------- hold bus, next command starts with Sr
    begin
      int stops_before;
      stops_before = tA.stops;
      apb_write(REG_RAM_BASE + 12'(4*8'h50), 32'h77);
      apb_write(REG_CMD, mk_cmd(CMD_PRIV_WRITE, 7'h30, 8'd1, 8'h50, 1'b1));
      wait_done(ev);
      check(tA.stops == stops_before, "no STOP after held command");
      apb_write(REG_CMD, mk_cmd(CMD_PRIV_WRITE, 7'h30, 8'd1, 8'h50, 1'b0));
      wait_done(ev);
      check(tA.stops == stops_before + 1, "one STOP after both commands");
      check(tA.wr_cnt == 6 && tA.mem[4] == 8'h77 && tA.mem[5] == 8'h77, "held writes arrived");
    end

    // ---------------------------------------------- IBI with a command waiting: kept bus
    begin
      int stops_before;
      stops_before = tA.stops;
      ibi1 = 1'b1;
      wait (dut.u_central.st == dut.u_central.I_ADDR);
      ibi1 = 1'b0;
      apb_write(REG_RAM_BASE + 12'(4*8'h51), 32'h5C);
      apb_write(REG_CMD, mk_cmd(CMD_PRIV_WRITE, 7'h30, 8'd1, 8'h51, 1'b0));
      wait_done(ev);
      check(ev[EV_IBI] && tA.ibi_acked == 2, "second IBI accepted");
      check(tA.stops == stops_before + 1, "IBI and waiting command share one STOP");
      check(tA.wr_cnt == 7 && tA.mem[6] == 8'h5C, "write after IBI arrived");
      n_ibi_hold = tA.stops == stops_before + 1 ? 1 : 0;
    end

    // ---------------------------------------------- overflow: read past the RAM end
    apb_write(REG_CMD, mk_cmd(CMD_PRIV_READ, 7'h30, 8'd3, 8'hFE, 1'b0));
    wait_done(ev);
    check(ev[EV_OVERFLOW], "overflow event");
    apb_read(REG_RAM_BASE + 12'(4*8'hFE), d);
    check(d[7:0] == 8'h90, "byte before the end stored");
    apb_read(REG_RAM_BASE + 12'(4*8'hFF), d);
    check(d[7:0] == 8'h91, "last RAM byte stored");

    // ---------------------------------------------- IBIs refused by CTRL -> broadcast DISEC
    apb_write(REG_CTRL, 32'b1101);    // enable, refuse IBIs, DISEC on NACK, to all targets
    ibi1 = 1'b1;
    wait_event(EV_IBI_REJECT, ev);
    repeat (1500) @(posedge clk);
    ibi1 = 1'b0;
    check(tA.ibi_nacked == 1, $sformatf("target A IBI NACKed %0d", tA.ibi_nacked));
    check(tA.ibi_disabled, "target A interrupts disabled by broadcast DISEC");
    check(tA.last_ccc == CCC_DISEC_B && tB.last_ccc == CCC_DISEC_B,
          "broadcast DISEC seen by both targets");
    apb_read(REG_STATUS, d);
    check(d[0] == 1'b0, "idle after broadcast DISEC");

    // ---------------------------------------------- interrupt line
    apb_write(REG_CMD, mk_cmd(CMD_I2C_WRITE, 7'h50, 8'd1, 8'h20, 1'b0));
    repeat (3000) @(posedge clk);
    check(irq == 1'b1, "irq raised by CMD_DONE");
    apb_write(REG_INT_STAT, 32'h3F);
    repeat (3) @(posedge clk);
    check(irq == 1'b0, "irq cleared by write-1");

    // ---------------------------------------------- mechanisms and timing
    check(n_daa_arb > 0, "mechanism: DAA arbitration");
    check(n_t_end > 0, "mechanism: read ended by T bit");
    check(n_addr_nack > 0, "mechanism: address NACK");
    check(n_ibi_ok > 0, "mechanism: IBI accepted");
    check(n_ibi_rej > 0, "mechanism: IBI rejected");
    check(n_disec > 0, "mechanism: direct DISEC sent");
    check(n_disec_b > 0, "mechanism: broadcast DISEC sent");
    check(n_rstart_next > 0, "mechanism: next command with repeated start");
    check(n_overflow > 0, "mechanism: RAM overflow");
    check(n_ibi_hold > 0, "mechanism: bus kept after an IBI for a waiting command");
    check(per_ok > 100 && per_bad == 0, $sformatf("SCL phases ok=%0d bad=%0d", per_ok, per_bad));
    check(ofs_ok > 50 && ofs_bad == 0, $sformatf("SDA offset ok=%0d bad=%0d", ofs_ok, ofs_bad));
    check(conflicts == 0, $sformatf("SDA drive conflicts %0d", conflicts));
    $display("mechanisms: daa_arb=%0d t_end=%0d nack=%0d ibi_ok=%0d ibi_rej=%0d disec=%0d/%0d rstart=%0d ovf=%0d",
             n_daa_arb, n_t_end, n_addr_nack, n_ibi_ok, n_ibi_rej, n_disec, n_disec_b, n_rstart_next, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
