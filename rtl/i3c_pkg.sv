// i3c_pkg: types and constants shared by the I3C primary controller.
//
// The controller is split the way its block diagram is split: an APB register
// block, a central controller, a bus action controller, a bus driver, a RAM
// controller with its RAM, and an event detector. This package holds what
// they exchange: the bus actions (one start, stop, byte, ... per request),
// the CPU command word, the register map and the interrupt event bits.
// Action names follow the controller's own vocabulary ("Transmit Start",
// "Write Byte + T bit", "Read byte"); the encodings, register addresses and
// field positions are this design's own choices.
package i3c_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned APB_AW    = 12;   // APB byte address width
  localparam int unsigned APB_DW    = 32;   // APB data width
  localparam int unsigned TIMER_W   = 16;   // SCL high/low counter width
  localparam int unsigned OFFSET_W  = 8;    // SDA offset counter width

  // ------------------------------------------------------- bus driver side
  // SCL command: drive high and hold T_HIGH, drive low and hold T_LOW, or
  // clock one bit (low for T_LOW, high for T_HIGH, then low again).
  typedef enum logic [1:0] {
    SCL_HIGH  = 2'd0,
    SCL_LOW   = 2'd1,
    SCL_CLOCK = 2'd2
  } scl_cmd_e;

  // ------------------------------------------------------ bus action codes
  typedef enum logic [3:0] {
    ACT_START  = 4'd0,  // SDA falls while SCL high, then SCL low
    ACT_RSTART = 4'd1,  // repeated start from SCL low
    ACT_STOP   = 4'd2,  // SDA rises while SCL high, bus left idle
    ACT_TX_ACK = 4'd3,  // 8 bits out, 9th bit: read ACK from target
    ACT_TX_T   = 4'd4,  // 8 bits out, 9th bit: odd parity T bit
    ACT_RX     = 4'd5,  // 8 bits in, no 9th bit
    ACT_RX_T   = 4'd6,  // 8 bits in, 9th bit: T (end-of-data) from target
    ACT_ACK    = 4'd7   // one bit: drive ACK (low) or leave NACK (high)
  } act_e;

  // --------------------------------------------------------- CPU commands
  typedef enum logic [3:0] {
    CMD_PRIV_WRITE = 4'd1,  // I3C private write  (7E/W, Sr, addr/W, data+T)
    CMD_PRIV_READ  = 4'd2,  // I3C private read   (7E/W, Sr, addr/R, data+T)
    CMD_CCC_BCAST  = 4'd3,  // broadcast CCC      (7E/W, code+T, data+T)
    CMD_DAA        = 4'd4,  // dynamic address assignment (ENTDAA)
    CMD_I2C_WRITE  = 4'd5,  // legacy I2C write   (addr/W, data+ACK)
    CMD_I2C_READ   = 4'd6   // legacy I2C read    (addr/R, data, ACK/NACK)
  } cmd_type_e;

  typedef struct packed {
    logic [7:0] ram_base;   // [31:24] first RAM byte used by the command
    logic [7:0] length;     // [23:16] number of data bytes
    logic [2:0] rsvd;       // [15:13]
    logic       hold_bus;   // [12] end without STOP; next command uses Sr
    logic       rsvd1;      // [11]
    logic [6:0] addr;       // [10:4] target address
    cmd_type_e  ctype;      // [3:0]
  } cmd_t;

  // ------------------------------------------------------ CCC codes (I3C)
  localparam logic [7:0] CCC_ENTDAA     = 8'h07;
  localparam logic [7:0] CCC_DISEC_B    = 8'h01;  // broadcast DISEC
  localparam logic [7:0] CCC_DISEC_D    = 8'h81;  // direct DISEC
  localparam logic [7:0] DISEC_DISINT   = 8'h01;  // disable IBI bit
  localparam logic [6:0] I3C_BCAST_ADDR = 7'h7E;

  // ------------------------------------------------------ interrupt events
  localparam int unsigned EV_CMD_DONE    = 0;
  localparam int unsigned EV_NACK        = 1;
  localparam int unsigned EV_IBI         = 2;
  localparam int unsigned EV_IBI_REJECT  = 3;
  localparam int unsigned EV_OVERFLOW    = 4;
  localparam int unsigned EV_DAA_DONE    = 5;
  localparam int unsigned N_EVENTS       = 6;

  // --------------------------------------------------------- register map
  localparam logic [APB_AW-1:0] REG_CTRL      = 12'h000; // [0] enable [1] IBI accept [2] disable IBI on NACK [3] DISEC to all
  localparam logic [APB_AW-1:0] REG_SCL_TIME  = 12'h004; // [15:0] T_LOW  [31:16] T_HIGH (system clocks)
  localparam logic [APB_AW-1:0] REG_SDA_OFS   = 12'h008; // [7:0] SDA offset after SCL falls
  localparam logic [APB_AW-1:0] REG_CMD       = 12'h00C; // cmd_t; a write launches it
  localparam logic [APB_AW-1:0] REG_STATUS    = 12'h010; // [0] busy [15:8] bytes moved [23:16] DAA count
  localparam logic [APB_AW-1:0] REG_INT_EN    = 12'h014; // event enable mask
  localparam logic [APB_AW-1:0] REG_INT_STAT  = 12'h018; // pending events, write 1 to clear
  localparam logic [APB_AW-1:0] REG_IBI       = 12'h01C; // [7:0] IBI data [14:8] IBI address [15] data valid
  localparam logic [APB_AW-1:0] REG_CCC       = 12'h020; // [7:0] CCC code for CMD_CCC_BCAST
  localparam logic [APB_AW-1:0] REG_DAT_BASE  = 12'h040; // device address table, 4 bytes per entry
  localparam logic [APB_AW-1:0] REG_RAM_BASE  = 12'h400; // RAM window, one byte per 32-bit word

  // Device address table entry.
  typedef struct packed {
    logic [7:0] dcr;        // [31:24] DCR read during DAA
    logic [7:0] bcr;        // [23:16] BCR read during DAA
    logic [4:0] rsvd;       // [15:11]
    logic       assigned;   // [10] dynamic address given to a target
    logic       ibi_en;     // [9]  IBIs from this target are accepted
    logic       valid;      // [8]  entry may be handed out during DAA
    logic       rsvd1;      // [7]
    logic [6:0] dyn_addr;   // [6:0]
  } dat_entry_t;

  // Odd parity bit over a byte: the 9-bit word (byte, T) has an odd number of ones.
  function automatic logic odd_parity(input logic [7:0] b);
    return ~(^b);
  endfunction

endpackage
