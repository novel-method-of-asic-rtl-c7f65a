// i3c_controller_top: I3C primary controller with an APB programming port.
//
// A CPU sets the controller up and gives it commands over AMBA APB; the
// controller runs them on the two-wire I3C bus (SCL, SDA): private reads and
// writes, broadcast common command codes, dynamic address assignment, legacy
// I2C transfers, and it answers in-band interrupts raised by targets. irq
// tells the CPU that an enabled event has happened.
//
// Blocks and their connections, left to right:
//   APB register block  -> control (enable, timing, command, table) to the
//                          central controller; status and table updates back;
//                          event status to the event detector; RAM port A
//   central controller  -> one bus action at a time to the bus action
//                          controller; RAM port B
//   bus action ctrl     -> SCL commands and SDA values to the bus driver
//   bus driver          -> pad signals (state, tri-state buffer enable, read)
//   RAM controller      -> single-port data RAM, APB side first
// The enable bit of the control register reaches the central controller, the
// bus action controller and the bus driver, as in the controller's top view.
//
// Pads: for each line, *_state is the value to drive, *_tribuf_en enables the
// pad's tri-state buffer and *_read is the line level. The pull-up resistors
// and buffers are outside this module. Everything is synchronous to clk with
// an active-low asynchronous reset.
module i3c_controller_top
  import i3c_pkg::*;
#(
  parameter int unsigned N_DAT     = 8,
  parameter int unsigned RAM_DEPTH = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  // APB
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [APB_AW-1:0] paddr,
  input  logic [APB_DW-1:0] pwdata,
  output logic [APB_DW-1:0] prdata,
  output logic              pready,
  output logic              pslverr,
  // event bus
  output logic              irq,
  // I3C pads
  output logic              sda_state,
  output logic              sda_tribuf_en,
  input  logic              sda_read,
  output logic              scl_state,
  output logic              scl_tribuf_en,
  input  logic              scl_read
);

  localparam int unsigned RAW = $clog2(RAM_DEPTH);
  localparam int unsigned DIW = (N_DAT > 1) ? $clog2(N_DAT) : 1;

  // register block <-> central controller
  logic                 ctrl_enable, ibi_accept, dis_on_nack, disec_all;
  logic [TIMER_W-1:0]   t_low, t_high;
  logic [OFFSET_W-1:0]  sda_offset;
  logic                 cmd_valid;
  cmd_t                 cmd;
  logic [7:0]           ccc_code;
  dat_entry_t           dat [N_DAT];
  logic                 busy;
  logic [7:0]           byte_cnt, daa_cnt;
  logic                 dat_we;
  logic [DIW-1:0]       dat_widx;
  dat_entry_t           dat_wdata;
  logic                 ibi_we;
  logic [14:0]          ibi_wdata;
  logic [N_EVENTS-1:0]  events, int_en, int_clr, int_pending;

  // RAM
  logic           a_req, a_we, a_gnt, a_rvalid;
  logic [RAW-1:0] a_addr;
  logic [7:0]     a_wdata, a_rdata;
  logic           b_req, b_we, b_gnt, b_rvalid;
  logic [RAW-1:0] b_addr;
  logic [7:0]     b_wdata, b_rdata;
  logic           m_en, m_we;
  logic [RAW-1:0] m_addr;
  logic [7:0]     m_wdata, m_rdata;

  // central controller <-> bus action controller
  logic       act_valid, act_ack, act_od, act_ready, act_done;
  act_e       act;
  logic [7:0] act_tx, rx_data;
  logic       rx_ack, rx_t, target_start;

  // bus action controller <-> bus driver
  logic     scl_cmd_valid, scl_ready, scl_done, scl_level;
  scl_cmd_e scl_cmd;
  logic     sda_cmd_valid, sda_value, sda_drive, sda_pp, sda_done;
  logic     sda_sample, sda_in, scl_in;

  i3c_apb_regs #(.N_DAT(N_DAT), .RAM_DEPTH(RAM_DEPTH)) u_regs (
    .clk, .rst_n,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .ctrl_enable, .ibi_accept, .dis_on_nack, .disec_all,
    .t_low, .t_high, .sda_offset,
    .cmd_valid, .cmd, .ccc_code, .dat,
    .busy, .byte_cnt, .daa_cnt, .dat_we, .dat_widx, .dat_wdata, .ibi_we, .ibi_wdata,
    .int_en, .int_clr, .int_pending,
    .ram_req(a_req), .ram_we(a_we), .ram_addr(a_addr), .ram_wdata(a_wdata),
    .ram_gnt(a_gnt), .ram_rvalid(a_rvalid), .ram_rdata(a_rdata)
  );

  i3c_event_det u_events (
    .clk, .rst_n,
    .ev(events), .int_en, .clr(int_clr), .pending(int_pending), .irq
  );

  i3c_central_ctrl #(.N_DAT(N_DAT), .RAM_DEPTH(RAM_DEPTH)) u_central (
    .clk, .rst_n,
    .enable(ctrl_enable), .ibi_accept, .dis_on_nack, .disec_all,
    .cmd_valid, .cmd, .ccc_code, .dat,
    .busy, .byte_cnt, .daa_cnt, .dat_we, .dat_widx, .dat_wdata, .ibi_we, .ibi_wdata,
    .events,
    .ram_req(b_req), .ram_we(b_we), .ram_addr(b_addr), .ram_wdata(b_wdata),
    .ram_gnt(b_gnt), .ram_rvalid(b_rvalid), .ram_rdata(b_rdata),
    .act_valid, .act, .act_tx, .act_ack, .act_od, .act_ready, .act_done,
    .rx_data, .rx_ack, .rx_t, .target_start
  );

  i3c_ram_ctrl #(.DEPTH(RAM_DEPTH)) u_ram_ctrl (
    .clk, .rst_n,
    .a_req, .a_we, .a_addr, .a_wdata, .a_gnt, .a_rvalid, .a_rdata,
    .b_req, .b_we, .b_addr, .b_wdata, .b_gnt, .b_rvalid, .b_rdata,
    .ram_en(m_en), .ram_we(m_we), .ram_addr(m_addr), .ram_wdata(m_wdata),
    .ram_rdata(m_rdata)
  );

  i3c_ram #(.DEPTH(RAM_DEPTH)) u_ram (
    .clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata)
  );

  i3c_bus_action u_action (
    .clk, .rst_n, .enable(ctrl_enable),
    .act_valid, .act, .act_tx, .act_ack, .act_od, .act_ready, .act_done,
    .rx_data, .rx_ack, .rx_t, .target_start,
    .scl_cmd_valid, .scl_cmd, .scl_done, .scl_level,
    .sda_cmd_valid, .sda_value, .sda_drive, .sda_pp, .sda_done, .sda_sample, .sda_in
  );

  i3c_bus_driver u_driver (
    .clk, .rst_n, .enable(ctrl_enable),
    .t_low, .t_high, .sda_offset,
    .scl_cmd_valid, .scl_cmd, .scl_ready, .scl_done, .scl_level,
    .sda_cmd_valid, .sda_value, .sda_drive, .sda_pp, .sda_done, .sda_sample,
    .sda_in, .scl_in,
    .sda_state, .sda_tribuf_en, .sda_read, .scl_state, .scl_tribuf_en, .scl_read
  );

endmodule
