// i3c_bus_action: the bus action controller.
//
// The I3C and I2C transfers are built from a few repeated pieces, so this
// block offers them as "actions" the central controller can call one at a
// time: start, repeated start, stop, write a byte and read the ACK, write a
// byte plus its T (parity) bit, read a byte, read a byte plus its T
// (end-of-data) bit, and send one ACK/NACK bit. A request is taken with
// act_valid while act_ready is high; when the action has finished on the bus
// act_done pulses for one clock together with its results (rx_data, rx_ack,
// rx_t). This is the select-an-action / report-completion scheme of the
// controller's bus action block; the list of actions beyond "Transmit Start",
// "Write Byte + T bit" and "Read byte" and all encodings are this design's.
//
// Each action is a short sequence of bus driver commands:
//   START  : SDA low (SCL high), hold SCL high t_high, SCL low
//   RSTART : release SDA (after the SDA offset), SCL high for t_high, then START
//   STOP   : SDA low, SCL high for t_high, release SDA, hold t_high (bus free)
//   bits   : for each bit one SDA command and one SCL_CLOCK, issued together;
//            the driver moves SDA sda_offset clocks after SCL fell and samples
//            SDA at the end of the high phase. MSB first.
// Address bytes and ACKs use open drain (act_od = 1); the T-bit data phase
// is driven push-pull (act_od = 0) as I3C SDR does; the T bit written after a
// byte makes the 9-bit word odd parity.
//
// target_start is high while the controller is idle, SCL is high and a
// target holds SDA low: a target is starting an in-band interrupt.
module i3c_bus_action
  import i3c_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  // request from the central controller
  input  logic       act_valid,
  input  act_e       act,
  input  logic [7:0] act_tx,
  input  logic       act_ack,     // ACT_ACK: 1 = send ACK, 0 = send NACK
  input  logic       act_od,      // open-drain for written bits
  output logic       act_ready,
  output logic       act_done,
  output logic [7:0] rx_data,
  output logic       rx_ack,      // target acknowledged (SDA low in 9th bit)
  output logic       rx_t,        // T bit read after a byte
  output logic       target_start,
  // bus driver
  output logic       scl_cmd_valid,
  output scl_cmd_e   scl_cmd,
  input  logic       scl_done,
  input  logic       scl_level,
  output logic       sda_cmd_valid,
  output logic       sda_value,
  output logic       sda_drive,
  output logic       sda_pp,
  input  logic       sda_done,
  input  logic       sda_sample,
  input  logic       sda_in
);

  typedef enum logic [3:0] {
    A_IDLE,
    A_RS_REL,    // RSTART: release SDA
    A_RS_HIGH,   // RSTART: SCL high
    A_ST_SDA,    // START: SDA low
    A_ST_HOLD,   // START: hold SCL high
    A_ST_LOW,    // START: SCL low
    A_SP_SDA,    // STOP: SDA low
    A_SP_HIGH,   // STOP: SCL high
    A_SP_REL,    // STOP: release SDA
    A_SP_FREE,   // STOP: bus free time
    A_BIT,       // issue one bit
    A_BIT_WAIT,  // wait for its SCL period
    A_DONE
  } a_st_e;

  a_st_e      st;
  logic [8:0] bit_val;   // value of each bit, MSB first
  logic [8:0] bit_drv;   // 1 = drive that bit, 0 = release
  logic [3:0] nbits;
  logic [3:0] bidx;
  logic [8:0] shreg;
  logic       od;
  logic       waiting;   // a driver command is outstanding

  assign act_ready    = (st == A_IDLE) && enable;
  assign target_start = (st == A_IDLE) && enable && scl_level && !sda_in;

  // one driver command per state entry, then wait for its completion pulse
  always_comb begin
    scl_cmd_valid = 1'b0;
    scl_cmd       = SCL_HIGH;
    sda_cmd_valid = 1'b0;
    sda_value     = 1'b1;
    sda_drive     = 1'b0;
    sda_pp        = 1'b0;
    if (!waiting) begin
      unique case (st)
        A_RS_REL:  begin sda_cmd_valid = 1'b1; end
        A_RS_HIGH: begin scl_cmd_valid = 1'b1; scl_cmd = SCL_HIGH; end
        A_ST_SDA:  begin sda_cmd_valid = 1'b1; sda_value = 1'b0; sda_drive = 1'b1; end
        A_ST_HOLD: begin scl_cmd_valid = 1'b1; scl_cmd = SCL_HIGH; end
        A_ST_LOW:  begin scl_cmd_valid = 1'b1; scl_cmd = SCL_LOW; end
        A_SP_SDA:  begin sda_cmd_valid = 1'b1; sda_value = 1'b0; sda_drive = 1'b1; end
        A_SP_HIGH: begin scl_cmd_valid = 1'b1; scl_cmd = SCL_HIGH; end
        A_SP_REL:  begin sda_cmd_valid = 1'b1; end
        A_SP_FREE: begin scl_cmd_valid = 1'b1; scl_cmd = SCL_HIGH; end
        A_BIT: begin
          scl_cmd_valid = 1'b1;
          scl_cmd       = SCL_CLOCK;
          sda_cmd_valid = 1'b1;
          sda_value     = bit_val[8];
          sda_drive     = bit_drv[8];
          sda_pp        = !od;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= A_IDLE;
      waiting  <= 1'b0;
      bit_val  <= '1;
      bit_drv  <= '0;
      nbits    <= '0;
      bidx     <= '0;
      shreg    <= '0;
      od       <= 1'b1;
      act_done <= 1'b0;
      rx_data  <= '0;
      rx_ack   <= 1'b0;
      rx_t     <= 1'b0;
    end else if (!enable) begin
      st       <= A_IDLE;
      waiting  <= 1'b0;
      act_done <= 1'b0;
    end else begin
      act_done <= 1'b0;
      if (!waiting && st != A_IDLE && st != A_DONE) waiting <= 1'b1;
      unique case (st)
        A_IDLE: if (act_valid) begin
          od    <= act_od;
          bidx  <= '0;
          shreg <= '0;
          unique case (act)
            ACT_START:  st <= A_ST_SDA;
            ACT_RSTART: st <= A_RS_REL;
            ACT_STOP:   st <= A_SP_SDA;
            ACT_TX_ACK: begin
              bit_val <= {act_tx, 1'b1};
              bit_drv <= {8'hFF, 1'b0};
              nbits   <= 4'd9;
              st      <= A_BIT;
            end
            ACT_TX_T: begin
              bit_val <= {act_tx, odd_parity(act_tx)};
              bit_drv <= '1;
              nbits   <= 4'd9;
              st      <= A_BIT;
            end
            ACT_RX: begin
              bit_val <= '1;
              bit_drv <= '0;
              nbits   <= 4'd8;
              st      <= A_BIT;
            end
            ACT_RX_T: begin
              bit_val <= '1;
              bit_drv <= '0;
              nbits   <= 4'd9;
              st      <= A_BIT;
            end
            ACT_ACK: begin
              bit_val <= {!act_ack, 8'hFF};
              bit_drv <= {act_ack, 8'h00};
              nbits   <= 4'd1;
              st      <= A_BIT;
            end
            default: st <= A_DONE;
          endcase
        end
        A_RS_REL:  if (sda_done) begin st <= A_RS_HIGH; waiting <= 1'b0; end
        A_RS_HIGH: if (scl_done) begin st <= A_ST_SDA;  waiting <= 1'b0; end
        A_ST_SDA:  if (sda_done) begin st <= A_ST_HOLD; waiting <= 1'b0; end
        A_ST_HOLD: if (scl_done) begin st <= A_ST_LOW;  waiting <= 1'b0; end
        A_ST_LOW:  if (scl_done) begin st <= A_DONE;    waiting <= 1'b0; end
        A_SP_SDA:  if (sda_done) begin st <= A_SP_HIGH; waiting <= 1'b0; end
        A_SP_HIGH: if (scl_done) begin st <= A_SP_REL;  waiting <= 1'b0; end
        A_SP_REL:  if (sda_done) begin st <= A_SP_FREE; waiting <= 1'b0; end
        A_SP_FREE: if (scl_done) begin st <= A_DONE;    waiting <= 1'b0; end
        A_BIT: begin
          st <= A_BIT_WAIT;
        end
        A_BIT_WAIT: if (scl_done) begin
          waiting <= 1'b0;
          shreg   <= {shreg[7:0], sda_sample};
          bit_val <= {bit_val[7:0], 1'b1};
          bit_drv <= {bit_drv[7:0], 1'b0};
          bidx    <= bidx + 1'b1;
          st      <= (bidx + 1'b1 == nbits) ? A_DONE : A_BIT;
        end
        A_DONE: begin
          act_done <= 1'b1;
          if (nbits == 4'd9) begin
            rx_data <= shreg[8:1];
            rx_ack  <= !shreg[0];
            rx_t    <= shreg[0];
          end else if (nbits == 4'd8) begin
            rx_data <= shreg[7:0];
          end
          nbits <= '0;
          st    <= A_IDLE;
        end
        default: st <= A_IDLE;
      endcase
    end
  end

endmodule
