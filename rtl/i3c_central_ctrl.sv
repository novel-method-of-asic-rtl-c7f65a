// i3c_central_ctrl: the central controller of the I3C primary controller.
//
// It watches the command register and the bus, picks the process to run and
// walks it as a sequence of bus actions (start, address, byte, stop, ...)
// handed one at a time to the bus action controller. One state machine holds
// the process-selection step and the process flows:
//   private write / read  START, 7E/W, Sr, address+R/W, data bytes with T bits
//   legacy I2C write/read START, address+R/W, data bytes with ACK
//   broadcast CCC         START, 7E/W, CCC code, data bytes
//   dynamic address       START, 7E/W, ENTDAA; per target: Sr, 7E/R, read
//     assignment (DAA)    PID/BCR/DCR (8 bytes), write the next free dynamic
//                         address from the device address table with parity;
//                         stop when no target answers or the table is used up
//   in-band interrupt     a target pulls SDA low on the idle bus: take over
//     (IBI)               with START, read its address, ACK it if it is an
//                         assigned table entry with IBIs enabled and BCR[2]
//                         set, then read one data byte; otherwise NACK it and,
//                         if configured, send DISEC (disable interrupts) to
//                         that target or to all targets
// A NACK to an address phase ends the command with STOP and an error event.
// A command with hold_bus set ends without STOP; the next command then opens
// with a repeated start. After an IBI the bus is kept (repeated start) when a
// command is already waiting, and released with STOP otherwise.
//
// Data bytes come from and go to the data RAM through the RAM controller,
// starting at the command's ram_base. PID bytes found during DAA are stored
// 8 per target from ram_base. A byte address past the RAM raises the overflow
// event and the byte is dropped.
//
// Interfaces: command in (cmd_valid pulse + cmd, one command may wait while
// another runs; a further one is dropped), device address table in and a
// write port back to it, IBI result write port, event pulses, RAM port B,
// bus action request/done handshake. Flows follow the controller's state
// diagrams; the 0x7E header before private transfers, the CCC codes (ENTDAA
// 0x07, DISEC 0x01/0x81) and the T-bit handling follow the I3C SDR protocol;
// the command format, the table layout and the RAM use are this design's.
module i3c_central_ctrl
  import i3c_pkg::*;
#(
  parameter int unsigned N_DAT     = 8,
  parameter int unsigned RAM_DEPTH = 256,
  localparam int unsigned RAW      = $clog2(RAM_DEPTH),
  localparam int unsigned DIW      = (N_DAT > 1) ? $clog2(N_DAT) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  input  logic                ibi_accept,
  input  logic                dis_on_nack,
  input  logic                disec_all,
  // commands and table from the register block
  input  logic                cmd_valid,
  input  cmd_t                cmd,
  input  logic [7:0]          ccc_code,
  input  dat_entry_t          dat [N_DAT],
  // status back to the register block
  output logic                busy,
  output logic [7:0]          byte_cnt,
  output logic [7:0]          daa_cnt,
  output logic                dat_we,
  output logic [DIW-1:0]      dat_widx,
  output dat_entry_t          dat_wdata,
  output logic                ibi_we,
  output logic [14:0]         ibi_wdata,
  output logic [N_EVENTS-1:0] events,
  // RAM controller, port B
  output logic                ram_req,
  output logic                ram_we,
  output logic [RAW-1:0]      ram_addr,
  output logic [7:0]          ram_wdata,
  input  logic                ram_gnt,
  input  logic                ram_rvalid,
  input  logic [7:0]          ram_rdata,
  // bus action controller
  output logic                act_valid,
  output act_e                act,
  output logic [7:0]          act_tx,
  output logic                act_ack,
  output logic                act_od,
  input  logic                act_ready,
  input  logic                act_done,
  input  logic [7:0]          rx_data,
  input  logic                rx_ack,
  input  logic                rx_t,
  input  logic                target_start
);

  typedef enum logic [5:0] {
    P_IDLE,                                   // process selection
    P_START,                                  // START or Sr
    H_7E_W, H_RS, H_ADDR,                     // headers
    W_FETCH, W_WAIT, W_SEND,                  // write data
    R_RECV, R_STORE, R_ACK,                   // read data
    C_CODE,                                   // CCC code
    D_ENTDAA, D_RS, D_7E_R, D_PID, D_PID_ST, D_ADDR,
    I_START, I_ADDR, I_CHECK, I_ACK, I_DATA, I_NACK,
    I_RS, I_7E, I_DISEC, I_DRS, I_DADDR, I_DBYTE,
    E_END, E_STOP, E_FIN
  } c_st_e;

  c_st_e       st;
  logic        issued;       // action of the present state handed over
  cmd_t        pend_cmd, c;
  logic        pend_valid;
  logic        bus_held;     // SCL held low after a transfer without STOP
  logic [8:0]  idx;          // data byte counter
  logic [7:0]  data_q;       // byte fetched from RAM / received
  logic        end_hold;     // finish without STOP
  logic        err;
  logic        in_ibi;
  logic [2:0]  pid_k;        // PID/BCR/DCR byte counter during DAA
  logic [7:0]  bcr_q, dcr_q;
  logic [6:0]  ibi_addr;
  logic [DIW-1:0] sel_idx;   // table entry being worked on
  logic [N_EVENTS-1:0] ev_q;

  logic is_i2c, is_read;
  assign is_i2c  = (c.ctype == CMD_I2C_WRITE) || (c.ctype == CMD_I2C_READ);
  assign is_read = (c.ctype == CMD_PRIV_READ) || (c.ctype == CMD_I2C_READ);

  // ------------------------------------------------ device address table search
  logic           free_found, free_more, hit_found;
  logic [DIW-1:0] free_idx, hit_idx;
  always_comb begin
    free_found = 1'b0;
    free_more  = 1'b0;
    free_idx   = '0;
    hit_found  = 1'b0;
    hit_idx    = '0;
    for (int i = N_DAT-1; i >= 0; i--) begin
      if (dat[i].valid && !dat[i].assigned) begin
        free_found = 1'b1;
        free_idx   = DIW'(i);
        if (DIW'(i) != sel_idx) free_more = 1'b1;
      end
      if (dat[i].assigned && dat[i].dyn_addr == rx_data[7:1]) begin
        hit_found = 1'b1;
        hit_idx   = DIW'(i);
      end
    end
  end

  // RAM byte address for the present data or PID byte
  logic [9:0] ram_pos;
  always_comb begin
    if (st == D_PID_ST) ram_pos = 10'(c.ram_base) + 10'({daa_cnt, 3'b000}) + 10'(pid_k);
    else                ram_pos = 10'(c.ram_base) + 10'(idx);
  end
  logic ram_oob;
  assign ram_oob = ram_pos >= 10'(RAM_DEPTH);

  // ------------------------------------------------ action request per state
  always_comb begin
    act_valid = 1'b0;
    act       = ACT_START;
    act_tx    = '0;
    act_ack   = 1'b0;
    act_od    = 1'b1;
    unique case (st)
      P_START:  act = bus_held ? ACT_RSTART : ACT_START;
      H_7E_W:   act_tx = {I3C_BCAST_ADDR, 1'b0};
      H_RS:     act = ACT_RSTART;
      H_ADDR:   act_tx = {c.addr, is_read};
      W_SEND:   begin act_tx = data_q; act_od = is_i2c; end
      R_RECV:   act = is_i2c ? ACT_RX : ACT_RX_T;
      R_ACK:    begin act = ACT_ACK; act_ack = (idx < 9'(c.length)); end
      C_CODE:   begin act_tx = ccc_code; act_od = 1'b0; end
      D_ENTDAA: begin act_tx = CCC_ENTDAA; act_od = 1'b0; end
      D_RS:     act = ACT_RSTART;
      D_7E_R:   act_tx = {I3C_BCAST_ADDR, 1'b1};
      D_PID:    act = ACT_RX;
      D_ADDR:   act_tx = {dat[sel_idx].dyn_addr, odd_parity({1'b0, dat[sel_idx].dyn_addr})};
      I_START:  act = ACT_START;
      I_ADDR:   act = ACT_RX;
      I_ACK:    begin act = ACT_ACK; act_ack = 1'b1; end
      I_DATA:   act = ACT_RX_T;
      I_NACK:   begin act = ACT_ACK; act_ack = 1'b0; end
      I_RS:     act = ACT_RSTART;
      I_7E:     act_tx = {I3C_BCAST_ADDR, 1'b0};
      I_DISEC:  begin act_tx = disec_all ? CCC_DISEC_B : CCC_DISEC_D; act_od = 1'b0; end
      I_DRS:    act = ACT_RSTART;
      I_DADDR:  act_tx = {ibi_addr, 1'b0};
      I_DBYTE:  begin act_tx = DISEC_DISINT; act_od = 1'b0; end
      E_STOP:   act = ACT_STOP;
      default:  ;
    endcase
    // which states write a byte with T bit or with ACK
    unique case (st)
      H_7E_W, H_ADDR, D_7E_R, D_ADDR, I_7E, I_DADDR: act = ACT_TX_ACK;
      W_SEND:   act = is_i2c ? ACT_TX_ACK : ACT_TX_T;
      C_CODE, D_ENTDAA, I_DISEC, I_DBYTE: act = ACT_TX_T;
      default: ;
    endcase
    unique case (st)
      P_START, H_7E_W, H_RS, H_ADDR, W_SEND, R_RECV, R_ACK, C_CODE,
      D_ENTDAA, D_RS, D_7E_R, D_PID, D_ADDR, I_START, I_ADDR, I_ACK,
      I_DATA, I_NACK, I_RS, I_7E, I_DISEC, I_DRS, I_DADDR, I_DBYTE,
      E_STOP: act_valid = !issued && act_ready;
      default: act_valid = 1'b0;
    endcase
  end

  // ------------------------------------------------ RAM requests
  always_comb begin
    ram_req   = 1'b0;
    ram_we    = 1'b0;
    ram_addr  = RAW'(ram_pos);
    ram_wdata = data_q;
    unique case (st)
      W_FETCH:  ram_req = (idx < 9'(c.length)) && !ram_oob;
      R_STORE,
      D_PID_ST: begin ram_req = !ram_oob; ram_we = 1'b1; end
      default: ;
    endcase
  end

  logic done_ev;   // the present action just finished
  assign done_ev = issued && act_done;

  assign busy   = (st != P_IDLE) || pend_valid;
  assign events = ev_q;

  // ------------------------------------------------ process FSMs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= P_IDLE;
      issued     <= 1'b0;
      pend_cmd   <= '0;
      pend_valid <= 1'b0;
      c          <= '0;
      bus_held   <= 1'b0;
      idx        <= '0;
      data_q     <= '0;
      end_hold   <= 1'b0;
      err        <= 1'b0;
      in_ibi     <= 1'b0;
      pid_k      <= '0;
      bcr_q      <= '0;
      dcr_q      <= '0;
      ibi_addr   <= '0;
      sel_idx    <= '0;
      ev_q       <= '0;
      byte_cnt   <= '0;
      daa_cnt    <= '0;
      dat_we     <= 1'b0;
      dat_widx   <= '0;
      dat_wdata  <= '0;
      ibi_we     <= 1'b0;
      ibi_wdata  <= '0;
    end else begin
      ev_q   <= '0;
      dat_we <= 1'b0;
      ibi_we <= 1'b0;
      if (act_valid) issued <= 1'b1;
      if (done_ev)   issued <= 1'b0;
      if (cmd_valid && !pend_valid) begin
        pend_cmd   <= cmd;
        pend_valid <= 1'b1;
      end

      unique case (st)
        // -------------------------------------------- process selection
        P_IDLE: if (enable) begin
          if (!bus_held && target_start) begin
            in_ibi <= 1'b1;
            st     <= I_START;
          end else if (pend_valid) begin
            c          <= pend_cmd;
            pend_valid <= 1'b0;
            idx        <= '0;
            err        <= 1'b0;
            in_ibi     <= 1'b0;
            end_hold   <= pend_cmd.hold_bus;
            if (pend_cmd.ctype == CMD_DAA) daa_cnt <= '0;
            unique case (pend_cmd.ctype)
              CMD_PRIV_WRITE, CMD_PRIV_READ, CMD_CCC_BCAST, CMD_DAA,
              CMD_I2C_WRITE, CMD_I2C_READ: st <= P_START;
              default: st <= E_FIN;
            endcase
          end
        end

        P_START: if (done_ev) begin
          bus_held <= 1'b0;
          st <= is_i2c ? H_ADDR : H_7E_W;
        end

        // -------------------------------------------- headers
        H_7E_W: if (done_ev) begin
          if (!rx_ack) begin
            err <= 1'b1; st <= E_STOP;
          end else unique case (c.ctype)
            CMD_CCC_BCAST: st <= C_CODE;
            CMD_DAA:       st <= D_ENTDAA;
            default:       st <= H_RS;
          endcase
        end
        H_RS: if (done_ev) st <= H_ADDR;
        H_ADDR: if (done_ev) begin
          if (!rx_ack)      begin err <= 1'b1; st <= E_STOP; end
          else if (is_read) st <= R_RECV;
          else              st <= W_FETCH;
        end

        // -------------------------------------------- write data
        W_FETCH: begin
          if (idx >= 9'(c.length)) st <= E_END;
          else if (ram_oob) begin
            ev_q[EV_OVERFLOW] <= 1'b1;
            st <= E_END;
          end else if (ram_gnt) st <= W_WAIT;
        end
        W_WAIT: if (ram_rvalid) begin
          data_q <= ram_rdata;
          st     <= W_SEND;
        end
        W_SEND: if (done_ev) begin
          idx <= idx + 1'b1;
          if (is_i2c && !rx_ack) begin
            // data NACKed by an I2C target: report it and end the transfer
            err <= 1'b1;
            st  <= E_END;
          end else st <= W_FETCH;
        end

        // -------------------------------------------- read data
        R_RECV: if (done_ev) begin
          data_q <= rx_data;
          st     <= R_STORE;
        end
        R_STORE: begin
          if (ram_oob || ram_gnt) begin
            if (ram_oob) ev_q[EV_OVERFLOW] <= 1'b1;
            idx <= idx + 1'b1;
            if (is_i2c)                                   st <= R_ACK;
            // I3C: T = 0 marks the target's last byte
            else if (!rx_t || idx + 1'b1 >= 9'(c.length)) st <= E_END;
            else                                          st <= R_RECV;
          end
        end
        R_ACK: if (done_ev) begin
          st <= (idx < 9'(c.length)) ? R_RECV : E_END;
        end

        // -------------------------------------------- broadcast CCC
        C_CODE: if (done_ev) st <= W_FETCH;

        // -------------------------------------------- dynamic address assignment
        // with no free table entry there is nothing to hand out
        D_ENTDAA: if (done_ev) st <= free_found ? D_RS : E_STOP;
        D_RS: if (done_ev) st <= D_7E_R;
        D_7E_R: if (done_ev) begin
          pid_k <= '0;
          // no target answers: every target has an address
          if (!rx_ack) st <= E_STOP;
          else         st <= D_PID;
        end
        D_PID: if (done_ev) begin
          data_q <= rx_data;
          if (pid_k == 3'd6) bcr_q <= rx_data;
          if (pid_k == 3'd7) dcr_q <= rx_data;
          st <= D_PID_ST;
        end
        D_PID_ST: if (ram_oob || ram_gnt) begin
          if (ram_oob) ev_q[EV_OVERFLOW] <= 1'b1;
          pid_k <= pid_k + 1'b1;
          if (pid_k == 3'd7) begin
            sel_idx <= free_idx;
            st      <= D_ADDR;
          end else st <= D_PID;
        end
        D_ADDR: if (done_ev) begin
          if (!rx_ack) begin
            err <= 1'b1;
            st  <= E_STOP;
          end else begin
            dat_we    <= 1'b1;
            dat_widx  <= sel_idx;
            dat_wdata <= '{dcr: dcr_q, bcr: bcr_q, rsvd: '0, assigned: 1'b1,
                           ibi_en: dat[sel_idx].ibi_en, valid: 1'b1, rsvd1: 1'b0,
                           dyn_addr: dat[sel_idx].dyn_addr};
            daa_cnt   <= daa_cnt + 1'b1;
            // next target if the table has another free address
            st        <= free_more ? D_RS : E_STOP;
          end
        end

        // -------------------------------------------- in-band interrupt
        I_START: if (done_ev) st <= I_ADDR;
        I_ADDR:  if (done_ev) st <= I_CHECK;
        I_CHECK: begin
          ibi_addr <= rx_data[7:1];
          sel_idx  <= hit_idx;
          if (ibi_accept && hit_found && dat[hit_idx].ibi_en && rx_data[0] &&
              dat[hit_idx].bcr[2]) st <= I_ACK;
          else                     st <= I_NACK;
        end
        I_ACK:  if (done_ev) st <= I_DATA;
        I_DATA: if (done_ev) begin
          ibi_we    <= 1'b1;
          ibi_wdata <= {ibi_addr, rx_data};
          ev_q[EV_IBI] <= 1'b1;
          end_hold  <= pend_valid;
          st        <= E_END;
        end
        I_NACK: if (done_ev) begin
          ev_q[EV_IBI_REJECT] <= 1'b1;
          if (dis_on_nack) st <= I_RS;
          else             st <= E_STOP;
        end
        I_RS: if (done_ev) st <= I_7E;
        I_7E: if (done_ev) st <= rx_ack ? I_DISEC : E_STOP;
        I_DISEC: if (done_ev) st <= disec_all ? I_DBYTE : I_DRS;
        I_DRS:   if (done_ev) st <= I_DADDR;
        I_DADDR: if (done_ev) st <= rx_ack ? I_DBYTE : E_STOP;
        I_DBYTE: if (done_ev) begin
          end_hold <= pend_valid;
          st       <= E_END;
        end

        // -------------------------------------------- end of a process
        E_END: begin
          if (end_hold) begin
            bus_held <= 1'b1;
            st       <= E_FIN;
          end else st <= E_STOP;
        end
        E_STOP: if (done_ev) begin
          bus_held <= 1'b0;
          st       <= E_FIN;
        end
        E_FIN: begin
          if (!in_ibi) begin
            ev_q[EV_CMD_DONE] <= 1'b1;
            byte_cnt <= idx[7:0];
            if (c.ctype == CMD_DAA) ev_q[EV_DAA_DONE] <= 1'b1;
          end
          if (err) ev_q[EV_NACK] <= 1'b1;
          err    <= 1'b0;
          in_ibi <= 1'b0;
          st     <= P_IDLE;
        end
        default: st <= P_IDLE;
      endcase

      if (!enable) begin
        st       <= P_IDLE;
        issued   <= 1'b0;
        bus_held <= 1'b0;
      end
    end
  end

endmodule
