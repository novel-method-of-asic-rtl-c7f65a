// i3c_apb_regs: the APB register block.
//
// An AMBA APB slave holding the register array through which the CPU sets up
// and drives the controller, and through which the central controller and the
// event detector report back. Register map (byte addresses, 32-bit words):
//   0x000 CTRL      [0] enable, [1] accept IBIs, [2] disable a rejected
//                   target's IBIs with DISEC, [3] send that DISEC to all targets
//   0x004 SCL_TIME  [15:0] SCL low time, [31:16] SCL high time (system clocks)
//   0x008 SDA_OFS   [7:0] SDA change delay after the SCL falling edge
//   0x00C CMD       command word (i3c_pkg::cmd_t); writing it launches it
//   0x010 STATUS    [0] busy, [15:8] bytes moved by the last command,
//                   [23:16] targets given an address by dynamic address assignment (read-only)
//   0x014 INT_EN    interrupt enable per event
//   0x018 INT_STAT  pending events, write 1 to clear
//   0x01C IBI       [7:0] IBI data byte, [14:8] IBI target address, [15] valid
//   0x020 CCC       [7:0] common command code for broadcast CCC commands
//   0x040+4*i       device address table entry i (i3c_pkg::dat_entry_t)
//   0x400+4*j       RAM byte j (bits [7:0])
// Register accesses complete without wait states. RAM accesses go through
// the RAM controller, where this block has priority: a write completes in
// its first access clock, a read one clock later (pready low meanwhile).
// An address outside the map answers with pslverr. When the central
// controller and the CPU write the same table entry in one clock, the central
// controller's write wins. The map itself is this design's choice; what the
// registers hold (bus timing, commands, status, address table) follows the
// controller's description.
module i3c_apb_regs
  import i3c_pkg::*;
#(
  parameter int unsigned N_DAT     = 8,
  parameter int unsigned RAM_DEPTH = 256,
  localparam int unsigned RAW      = $clog2(RAM_DEPTH),
  localparam int unsigned DIW      = (N_DAT > 1) ? $clog2(N_DAT) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // APB
  input  logic                 psel,
  input  logic                 penable,
  input  logic                 pwrite,
  input  logic [APB_AW-1:0]    paddr,
  input  logic [APB_DW-1:0]    pwdata,
  output logic [APB_DW-1:0]    prdata,
  output logic                 pready,
  output logic                 pslverr,
  // configuration and commands to the rest of the controller
  output logic                 ctrl_enable,
  output logic                 ibi_accept,
  output logic                 dis_on_nack,
  output logic                 disec_all,
  output logic [TIMER_W-1:0]   t_low,
  output logic [TIMER_W-1:0]   t_high,
  output logic [OFFSET_W-1:0]  sda_offset,
  output logic                 cmd_valid,
  output cmd_t                 cmd,
  output logic [7:0]           ccc_code,
  output dat_entry_t           dat [N_DAT],
  // status from the central controller
  input  logic                 busy,
  input  logic [7:0]           byte_cnt,
  input  logic [7:0]           daa_cnt,
  input  logic                 dat_we,
  input  logic [DIW-1:0]       dat_widx,
  input  dat_entry_t           dat_wdata,
  input  logic                 ibi_we,
  input  logic [14:0]          ibi_wdata,
  // event detector
  output logic [N_EVENTS-1:0]  int_en,
  output logic [N_EVENTS-1:0]  int_clr,
  input  logic [N_EVENTS-1:0]  int_pending,
  // RAM controller, port A
  output logic                 ram_req,
  output logic                 ram_we,
  output logic [RAW-1:0]       ram_addr,
  output logic [7:0]           ram_wdata,
  input  logic                 ram_gnt,
  input  logic                 ram_rvalid,
  input  logic [7:0]           ram_rdata
);

  logic [3:0]  ctrl_q;
  logic [15:0] ibi_q;
  logic        ram_wait;

  logic access, is_ram, is_dat, known;
  logic [DIW-1:0] dat_idx;

  assign access  = psel && penable;
  assign is_ram  = paddr >= REG_RAM_BASE && paddr < APB_AW'(REG_RAM_BASE + 4*RAM_DEPTH);
  assign is_dat  = paddr >= REG_DAT_BASE && paddr < APB_AW'(REG_DAT_BASE + 4*N_DAT);
  assign dat_idx = DIW'((paddr - REG_DAT_BASE) >> 2);

  always_comb begin
    known = is_ram || is_dat;
    unique case (paddr)
      REG_CTRL, REG_SCL_TIME, REG_SDA_OFS, REG_CMD, REG_STATUS,
      REG_INT_EN, REG_INT_STAT, REG_IBI, REG_CCC: known = 1'b1;
      default: ;
    endcase
  end

  assign ctrl_enable = ctrl_q[0];
  assign ibi_accept  = ctrl_q[1];
  assign dis_on_nack = ctrl_q[2];
  assign disec_all   = ctrl_q[3];

  // ------------------------------------------------------- RAM window
  assign ram_req   = access && is_ram && !ram_wait;
  assign ram_we    = pwrite;
  assign ram_addr  = RAW'((paddr - REG_RAM_BASE) >> 2);
  assign ram_wdata = pwdata[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  ram_wait <= 1'b0;
    else if (ram_req && ram_gnt && !pwrite) ram_wait <= 1'b1;
    else if (ram_rvalid)         ram_wait <= 1'b0;
  end

  always_comb begin
    if (access && is_ram) pready = pwrite ? ram_gnt : (ram_wait && ram_rvalid);
    else                  pready = 1'b1;
  end
  assign pslverr = access && pready && !known;

  // ------------------------------------------------------- register writes
  logic wr;
  assign wr = access && pwrite && pready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q     <= '0;
      t_low      <= TIMER_W'(8);
      t_high     <= TIMER_W'(8);
      sda_offset <= OFFSET_W'(2);
      cmd        <= '0;
      cmd_valid  <= 1'b0;
      ccc_code   <= '0;
      int_en     <= '0;
      int_clr    <= '0;
      ibi_q      <= '0;
      for (int i = 0; i < N_DAT; i++) dat[i] <= '0;
    end else begin
      cmd_valid <= 1'b0;
      int_clr   <= '0;
      if (wr) begin
        unique case (paddr)
          REG_CTRL:     ctrl_q <= pwdata[3:0];
          REG_SCL_TIME: begin t_low <= pwdata[15:0]; t_high <= pwdata[31:16]; end
          REG_SDA_OFS:  sda_offset <= pwdata[OFFSET_W-1:0];
          REG_CMD:      begin cmd <= cmd_t'(pwdata); cmd_valid <= 1'b1; end
          REG_INT_EN:   int_en <= pwdata[N_EVENTS-1:0];
          REG_INT_STAT: int_clr <= pwdata[N_EVENTS-1:0];
          REG_IBI:      ibi_q <= pwdata[15:0];
          REG_CCC:      ccc_code <= pwdata[7:0];
          default:      if (is_dat) dat[dat_idx] <= dat_entry_t'(pwdata);
        endcase
      end
      if (ibi_we)  ibi_q <= {1'b1, ibi_wdata};
      if (dat_we)  dat[dat_widx] <= dat_wdata;
    end
  end

  // ------------------------------------------------------- register reads
  always_comb begin
    prdata = '0;
    if (is_ram) prdata = {24'h0, ram_rdata};
    else if (is_dat) prdata = dat[dat_idx];
    else begin
      unique case (paddr)
        REG_CTRL:     prdata = {28'h0, ctrl_q};
        REG_SCL_TIME: prdata = {t_high, t_low};
        REG_SDA_OFS:  prdata = {{(APB_DW-OFFSET_W){1'b0}}, sda_offset};
        REG_CMD:      prdata = cmd;
        REG_STATUS:   prdata = {8'h0, daa_cnt, byte_cnt, 7'h0, busy};
        REG_INT_EN:   prdata = {{(APB_DW-N_EVENTS){1'b0}}, int_en};
        REG_INT_STAT: prdata = {{(APB_DW-N_EVENTS){1'b0}}, int_pending};
        REG_IBI:      prdata = {16'h0, ibi_q};
        REG_CCC:      prdata = {24'h0, ccc_code};
        default:      prdata = '0;
      endcase
    end
  end

  // APB rule: the access phase follows a setup phase with the same address.
  a_apb_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (psel && penable && !pready) |=> (psel && penable && $stable(paddr) && $stable(pwrite)));

endmodule
