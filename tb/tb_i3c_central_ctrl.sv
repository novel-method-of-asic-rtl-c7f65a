// tb_i3c_central_ctrl: the central controller against a scripted bus.
// A behavioural stand-in for the bus action controller logs every action
// the central controller asks for and answers it after a few clocks (ACK or
// NACK by address, bytes and T bits from a script). The logged sequence of
// each process is compared with the sequence the I3C / I2C flows require:
// private write and read, I2C write with an address NACK, broadcast CCC,
// dynamic address assignment of one target, an accepted IBI and a rejected
// IBI followed by a broadcast DISEC. RAM contents, table updates, the IBI
// result and the event pulses are checked as well. The RAM is the real RAM
// controller and RAM, filled and read through port A.
`timescale 1ns/1ps
module tb_i3c_central_ctrl;
  import i3c_pkg::*;
  localparam int N_DAT = 4;
  localparam int RAM_DEPTH = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        ibi_accept = 1'b1, dis_on_nack = 1'b1, disec_all = 1'b1;
  logic        cmd_valid = 1'b0;
  cmd_t        cmd = '0;
  logic [7:0]  ccc_code = 8'h00;
  dat_entry_t  dat [N_DAT];
  logic        busy;
  logic [7:0]  byte_cnt, daa_cnt;
  logic        dat_we, ibi_we;
  logic [1:0]  dat_widx;
  dat_entry_t  dat_wdata;
  logic [14:0] ibi_wdata;
  logic [N_EVENTS-1:0] events;
  logic        b_req, b_we, b_gnt, b_rvalid;
  logic [7:0]  b_addr, b_wdata, b_rdata;
  logic        a_req = 1'b0, a_we = 1'b0, a_gnt, a_rvalid;
  logic [7:0]  a_addr = '0, a_wdata = '0, a_rdata;
  logic        m_en, m_we;
  logic [7:0]  m_addr, m_wdata, m_rdata;
  logic        act_valid, act_ack, act_od;
  act_e        act;
  logic [7:0]  act_tx;
  logic        act_ready, act_done = 1'b0, rx_ack = 1'b0, rx_t = 1'b0, target_start = 1'b0;
  logic [7:0]  rx_data = '0;

  i3c_central_ctrl #(.N_DAT(N_DAT), .RAM_DEPTH(RAM_DEPTH)) dut (
    .clk, .rst_n, .enable(1'b1), .ibi_accept, .dis_on_nack, .disec_all,
    .cmd_valid, .cmd, .ccc_code, .dat,
    .busy, .byte_cnt, .daa_cnt, .dat_we, .dat_widx, .dat_wdata, .ibi_we, .ibi_wdata, .events,
    .ram_req(b_req), .ram_we(b_we), .ram_addr(b_addr), .ram_wdata(b_wdata),
    .ram_gnt(b_gnt), .ram_rvalid(b_rvalid), .ram_rdata(b_rdata),
    .act_valid, .act, .act_tx, .act_ack, .act_od, .act_ready, .act_done,
    .rx_data, .rx_ack, .rx_t, .target_start
  );
  i3c_ram_ctrl #(.DEPTH(RAM_DEPTH)) rc (
    .clk, .rst_n,
    .a_req, .a_we, .a_addr, .a_wdata, .a_gnt, .a_rvalid, .a_rdata,
    .b_req, .b_we, .b_addr, .b_wdata, .b_gnt, .b_rvalid, .b_rdata,
    .ram_en(m_en), .ram_we(m_we), .ram_addr(m_addr), .ram_wdata(m_wdata), .ram_rdata(m_rdata)
  );
  i3c_ram #(.DEPTH(RAM_DEPTH)) ram (.clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the register block's table
  always @(posedge clk) if (dat_we) dat[dat_widx] <= dat_wdata;

  // event and IBI capture
  logic [N_EVENTS-1:0] ev_seen = '0;
  logic [14:0] ibi_seen = '0;
  always @(posedge clk) if (rst_n) begin
    ev_seen |= events;
    if (ibi_we) ibi_seen = ibi_wdata;
  end

  // ------------------------------------------- scripted bus action responder
  // log entry: {act, tx, ack/od}
  typedef struct { act_e a; logic [7:0] tx; logic ack; logic od; } ent_t;
  ent_t       log_q[$];
  logic [7:0] ack_set[$];     // address bytes that are acknowledged
  logic [8:0] rx_q[$];        // {byte, T} answers for RX / RX_T
  int         busy_cnt = 0;
  logic       pending = 1'b0;
  assign act_ready = !pending;
  always @(posedge clk) begin
    act_done <= 1'b0;
    if (act_valid && act_ready) begin
      log_q.push_back('{act, act_tx, act_ack, act_od});
      pending  <= 1'b1;
      busy_cnt <= 3 + ($urandom % 5);
      rx_ack   <= 1'b0;
      foreach (ack_set[i]) if (act == ACT_TX_ACK && ack_set[i] == act_tx) rx_ack <= 1'b1;
      if ((act == ACT_RX || act == ACT_RX_T) && rx_q.size() > 0) begin
        rx_data <= rx_q[0][8:1];
        rx_t    <= rx_q[0][0];
        void'(rx_q.pop_front());
      end
    end else if (pending) begin
      if (busy_cnt == 0) begin
        act_done <= 1'b1;
        pending  <= 1'b0;
      end else busy_cnt <= busy_cnt - 1;
    end
  end

  task automatic expect_log(input ent_t e[], input string what);
    bit ok;
    ok = (log_q.size() == e.size());
    for (int i = 0; i < e.size() && ok; i++)
      ok = (log_q[i].a == e[i].a) &&
           ((e[i].a inside {ACT_TX_ACK, ACT_TX_T}) ? (log_q[i].tx == e[i].tx && log_q[i].od == e[i].od) : 1'b1) &&
           ((e[i].a == ACT_ACK) ? (log_q[i].ack == e[i].ack) : 1'b1);
    check(ok, what);
    if (!ok) foreach (log_q[i]) $display("  got %s %h ack=%b od=%b", log_q[i].a.name(), log_q[i].tx, log_q[i].ack, log_q[i].od);
    log_q.delete();
  endtask

  task automatic run_cmd(input cmd_type_e t, input logic [6:0] a, input logic [7:0] len,
                         input logic [7:0] base);
    @(posedge clk);
    cmd_valid <= 1'b1;
    cmd <= '{ram_base: base, length: len, rsvd: '0, hold_bus: 1'b0, rsvd1: 1'b0, addr: a, ctype: t};
    @(posedge clk);
    cmd_valid <= 1'b0;
    @(posedge clk);
    while (busy) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  task automatic ram_wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk); a_req = 1'b1; a_we = 1'b1; a_addr = a; a_wdata = d;
    @(negedge clk); a_req = 1'b0; a_we = 1'b0;
  endtask
  task automatic ram_rd(input logic [7:0] a, output logic [7:0] d);
    @(negedge clk); a_req = 1'b1; a_we = 1'b0; a_addr = a;
    @(negedge clk); a_req = 1'b0;
    d = a_rdata;
  endtask

  logic [7:0] b;
  initial begin
    for (int i = 0; i < N_DAT; i++) dat[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    dat[0] = '{dcr: 0, bcr: 0, rsvd: 0, assigned: 0, ibi_en: 1, valid: 1, rsvd1: 0, dyn_addr: 7'h30};
    dat[1] = '{dcr: 0, bcr: 0, rsvd: 0, assigned: 0, ibi_en: 0, valid: 1, rsvd1: 0, dyn_addr: 7'h31};

    // ---- DAA: one target answers
    ack_set = '{8'hFC};
    for (int k = 0; k < 8; k++) rx_q.push_back({8'h10 + 8'(k), 1'b0});
    rx_q[6] = {8'h06, 1'b0};               // BCR: IBI payload
    // the target ACKs 7E/R once, then its new address
    fork
      begin
        ack_set.push_back(8'hFD);
        ack_set.push_back({7'h30, ~(^7'h30)});
        wait (dat_we);
        ack_set.delete();
        ack_set.push_back(8'hFC);
      end
    join_none
    run_cmd(CMD_DAA, 7'h0, 8'd0, 8'h80);
    expect_log('{'{ACT_START, 0, 0, 1}, '{ACT_TX_ACK, 8'hFC, 0, 1}, '{ACT_TX_T, 8'h07, 0, 0},
                 '{ACT_RSTART, 0, 0, 1}, '{ACT_TX_ACK, 8'hFD, 0, 1},
                 '{ACT_RX, 0, 0, 1}, '{ACT_RX, 0, 0, 1}, '{ACT_RX, 0, 0, 1}, '{ACT_RX, 0, 0, 1},
                 '{ACT_RX, 0, 0, 1}, '{ACT_RX, 0, 0, 1}, '{ACT_RX, 0, 0, 1}, '{ACT_RX, 0, 0, 1},
                 '{ACT_TX_ACK, {7'h30, ~(^7'h30)}, 0, 1},
                 '{ACT_RSTART, 0, 0, 1}, '{ACT_TX_ACK, 8'hFD, 0, 1}, '{ACT_STOP, 0, 0, 1}}, "DAA sequence");
    check(dat[0].assigned && dat[0].bcr == 8'h06 && dat[0].dcr == 8'h17, "DAT 0 assigned with BCR/DCR");
    check(!dat[1].assigned, "DAT 1 still free");
    check(daa_cnt == 8'd1, "DAA count");
    check(ev_seen[EV_DAA_DONE] && ev_seen[EV_CMD_DONE] && !ev_seen[EV_NACK], "DAA events");
    for (int k = 0; k < 8; k++) begin
      ram_rd(8'h80 + 8'(k), b);
      check(b == ((k == 6) ? 8'h06 : 8'h10 + 8'(k)), $sformatf("PID byte %0d = %h", k, b));
    end
    ev_seen = '0;

    // ---- private write
    ack_set = '{8'hFC, 8'h60};
    ram_wr(8'h00, 8'hDE); ram_wr(8'h01, 8'hAD); ram_wr(8'h02, 8'hBE);
    run_cmd(CMD_PRIV_WRITE, 7'h30, 8'd3, 8'h00);
    expect_log('{'{ACT_START, 0, 0, 1}, '{ACT_TX_ACK, 8'hFC, 0, 1}, '{ACT_RSTART, 0, 0, 1},
                 '{ACT_TX_ACK, 8'h60, 0, 1}, '{ACT_TX_T, 8'hDE, 0, 0}, '{ACT_TX_T, 8'hAD, 0, 0},
                 '{ACT_TX_T, 8'hBE, 0, 0}, '{ACT_STOP, 0, 0, 1}}, "private write sequence");
    check(byte_cnt == 8'd3, "write byte count");

    // ---- private read ended by T = 0 after two bytes
    ack_set = '{8'hFC, 8'h63};
    rx_q = '{{8'h5A, 1'b1}, {8'hC3, 1'b0}};
    run_cmd(CMD_PRIV_READ, 7'h31, 8'd6, 8'h20);
    expect_log('{'{ACT_START, 0, 0, 1}, '{ACT_TX_ACK, 8'hFC, 0, 1}, '{ACT_RSTART, 0, 0, 1},
                 '{ACT_TX_ACK, 8'h63, 0, 1}, '{ACT_RX_T, 0, 0, 0}, '{ACT_RX_T, 0, 0, 0},
                 '{ACT_STOP, 0, 0, 1}}, "private read sequence");
    check(byte_cnt == 8'd2, "read byte count");
    ram_rd(8'h20, b); check(b == 8'h5A, "read byte 0");
    ram_rd(8'h21, b); check(b == 8'hC3, "read byte 1");

    // ---- I2C read of 2 bytes: ACK then NACK
    ack_set = '{8'hA1};
    rx_q = '{{8'h11, 1'b0}, {8'h22, 1'b0}};
    run_cmd(CMD_I2C_READ, 7'h50, 8'd2, 8'h30);
    expect_log('{'{ACT_START, 0, 0, 1}, '{ACT_TX_ACK, 8'hA1, 0, 1}, '{ACT_RX, 0, 0, 1},
                 '{ACT_ACK, 0, 1, 1}, '{ACT_RX, 0, 0, 1}, '{ACT_ACK, 0, 0, 1},
                 '{ACT_STOP, 0, 0, 1}}, "I2C read sequence");
    ram_rd(8'h31, b); check(b == 8'h22, "I2C byte 1");

    // ---- I2C write to an absent target: NACK, STOP, error event
    ev_seen = '0;
    ack_set = '{};
    run_cmd(CMD_I2C_WRITE, 7'h51, 8'd1, 8'h00);
    expect_log('{'{ACT_START, 0, 0, 1}, '{ACT_TX_ACK, 8'hA2, 0, 1}, '{ACT_STOP, 0, 0, 1}},
               "address NACK sequence");
    check(ev_seen[EV_NACK] && ev_seen[EV_CMD_DONE], "NACK event");

    // ---- broadcast CCC with one data byte
    ack_set = '{8'hFC};
    ccc_code = 8'h00;
    ram_wr(8'h40, 8'h01);
    run_cmd(CMD_CCC_BCAST, 7'h0, 8'd1, 8'h40);
    expect_log('{'{ACT_START, 0, 0, 1}, '{ACT_TX_ACK, 8'hFC, 0, 1}, '{ACT_TX_T, 8'h00, 0, 0},
                 '{ACT_TX_T, 8'h01, 0, 0}, '{ACT_STOP, 0, 0, 1}}, "CCC sequence");

    // ---- accepted IBI from 0x30 (assigned, ibi_en, BCR[2])
    ev_seen = '0;
    rx_q = '{{8'h61, 1'b0}, {8'hA5, 1'b0}};
    @(negedge clk); target_start = 1'b1;
    wait (busy);
    @(negedge clk); target_start = 1'b0;
    while (busy) @(posedge clk);
    repeat (2) @(posedge clk);
    expect_log('{'{ACT_START, 0, 0, 1}, '{ACT_RX, 0, 0, 1}, '{ACT_ACK, 0, 1, 1},
                 '{ACT_RX_T, 0, 0, 0}, '{ACT_STOP, 0, 0, 1}}, "accepted IBI sequence");
    check(ibi_seen == {7'h30, 8'hA5}, $sformatf("IBI result %h", ibi_seen));
    check(ev_seen[EV_IBI] && !ev_seen[EV_CMD_DONE], "IBI event only");

    // ---- rejected IBI from 0x31 (no ibi_en): NACK, then broadcast DISEC
    ev_seen = '0;
    ack_set = '{8'hFC};
    rx_q = '{{8'h63, 1'b0}};
    @(negedge clk); target_start = 1'b1;
    wait (busy);
    @(negedge clk); target_start = 1'b0;
    while (busy) @(posedge clk);
    repeat (2) @(posedge clk);
    expect_log('{'{ACT_START, 0, 0, 1}, '{ACT_RX, 0, 0, 1}, '{ACT_ACK, 0, 0, 1},
                 '{ACT_RSTART, 0, 0, 1}, '{ACT_TX_ACK, 8'hFC, 0, 1}, '{ACT_TX_T, 8'h01, 0, 0},
                 '{ACT_TX_T, 8'h01, 0, 0}, '{ACT_STOP, 0, 0, 1}}, "rejected IBI sequence");
    check(ev_seen[EV_IBI_REJECT] && !ev_seen[EV_IBI], "IBI reject event");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
