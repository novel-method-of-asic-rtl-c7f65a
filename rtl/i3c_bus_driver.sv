// i3c_bus_driver: drives and reads the two I3C bus lines, SCL and SDA.
//
// It holds two small controllers side by side, one per line, as in the bus
// driver block diagram (an SCL controller and an SDA controller).
//
// SCL controller. Three commands, given with scl_cmd_valid while scl_ready:
//   SCL_HIGH   drive SCL high and hold it high for t_high clocks,
//   SCL_LOW    drive SCL low (done on the next clock),
//   SCL_CLOCK  one bit period: SCL stays low until it has been low for t_low
//              clocks (counted from its falling edge, so back-to-back bits
//              have an exact period of t_low + t_high), then high for t_high
//              clocks, then low again.
// scl_done pulses for one clock when a command ends. At the end of the high
// phase of SCL_CLOCK the synchronised SDA level is captured in sda_sample.
//
// SDA controller. sda_cmd_valid loads a new SDA value (sda_value) and whether
// to drive it at all (sda_drive = 0 releases the line). While SCL is low the
// change waits until SCL has been low for sda_offset clocks: this is the
// programmable SDA offset after the SCL falling edge. While SCL is high the
// change is applied at once (start and stop conditions). sda_done pulses when
// the new value is on the pad.
//
// Pads follow the tri-state buffer of the port circuit: *_state is the value,
// *_tribuf_en enables the buffer, *_read is the line as seen on the pin.
// In open-drain mode (sda_pp = 0) the SDA buffer is enabled only to pull low;
// the pull-up gives the high level. SCL is always driven push-pull by this
// controller (this design's choice; no clock stretching). Both read inputs
// pass a two-flop synchroniser.
//
// Design choices: SCL commands, the counting scheme and the synchroniser are
// this design's; the split into an SCL and an SDA controller, the
// programmable high/low times and the SDA offset follow the controller's
// description. sda_offset must be smaller than t_low and t_high at least 3,
// so that a sample taken through the synchroniser sees the settled line.
module i3c_bus_driver
  import i3c_pkg::*;
#(
  parameter int unsigned TW = TIMER_W,
  parameter int unsigned OW = OFFSET_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  // timing configuration, in system clocks
  input  logic [TW-1:0] t_low,
  input  logic [TW-1:0] t_high,
  input  logic [OW-1:0] sda_offset,
  // SCL control / status
  input  logic          scl_cmd_valid,
  input  scl_cmd_e      scl_cmd,
  output logic          scl_ready,
  output logic          scl_done,
  output logic          scl_level,
  // SDA control / status
  input  logic          sda_cmd_valid,
  input  logic          sda_value,
  input  logic          sda_drive,
  input  logic          sda_pp,
  output logic          sda_done,
  output logic          sda_sample,
  output logic          sda_in,
  output logic          scl_in,
  // pads
  output logic          sda_state,
  output logic          sda_tribuf_en,
  input  logic          sda_read,
  output logic          scl_state,
  output logic          scl_tribuf_en,
  input  logic          scl_read
);

  typedef enum logic [1:0] {S_IDLE, S_CLK_LOW, S_CLK_HIGH, S_HOLD_HIGH} scl_st_e;

  scl_st_e       st;
  logic          scl_out;
  logic [TW-1:0] cnt;          // clocks spent at the present SCL level
  logic [1:0]    sda_sync, scl_sync;

  // SDA controller state
  logic sda_out, sda_drv, sda_ppm;
  logic pend, pend_val, pend_drv, pend_pp;

  assign scl_ready = (st == S_IDLE) && enable;
  assign scl_level = scl_out;
  assign sda_in    = sda_sync[1];
  assign scl_in    = scl_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sda_sync <= 2'b11;
      scl_sync <= 2'b11;
    end else begin
      sda_sync <= {sda_sync[0], sda_read};
      scl_sync <= {scl_sync[0], scl_read};
    end
  end

  // ------------------------------------------------------------ SCL control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      scl_out    <= 1'b1;
      cnt        <= '1;
      scl_done   <= 1'b0;
      sda_sample <= 1'b1;
    end else if (!enable) begin
      st       <= S_IDLE;
      scl_out  <= 1'b1;
      cnt      <= '1;
      scl_done <= 1'b0;
    end else begin
      scl_done <= 1'b0;
      if (cnt != '1) cnt <= cnt + 1'b1;
      unique case (st)
        S_IDLE: if (scl_cmd_valid) begin
          unique case (scl_cmd)
            SCL_HIGH: begin
              scl_out <= 1'b1;
              cnt     <= TW'(1);
              st      <= S_HOLD_HIGH;
            end
            SCL_LOW: begin
              if (scl_out) begin
                scl_out <= 1'b0;
                cnt     <= TW'(1);
              end
              scl_done <= 1'b1;
            end
            SCL_CLOCK: begin
              if (scl_out) begin
                scl_out <= 1'b0;
                cnt     <= TW'(1);
              end
              st <= S_CLK_LOW;
            end
            default: ;
          endcase
        end
        S_CLK_LOW: if (cnt >= t_low) begin
          scl_out <= 1'b1;
          cnt     <= TW'(1);
          st      <= S_CLK_HIGH;
        end
        S_CLK_HIGH: if (cnt >= t_high) begin
          scl_out    <= 1'b0;
          cnt        <= TW'(1);
          sda_sample <= sda_in;
          scl_done   <= 1'b1;
          st         <= S_IDLE;
        end
        S_HOLD_HIGH: if (cnt >= t_high) begin
          scl_done <= 1'b1;
          st       <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------ SDA control
  logic sda_apply;
  assign sda_apply = pend && (scl_out || (cnt >= TW'(sda_offset)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sda_out  <= 1'b1;
      sda_drv  <= 1'b0;
      sda_ppm  <= 1'b0;
      pend     <= 1'b0;
      pend_val <= 1'b1;
      pend_drv <= 1'b0;
      pend_pp  <= 1'b0;
      sda_done <= 1'b0;
    end else if (!enable) begin
      sda_out  <= 1'b1;
      sda_drv  <= 1'b0;
      pend     <= 1'b0;
      sda_done <= 1'b0;
    end else begin
      sda_done <= 1'b0;
      if (sda_apply) begin
        sda_out  <= pend_val;
        sda_drv  <= pend_drv;
        sda_ppm  <= pend_pp;
        pend     <= 1'b0;
        sda_done <= 1'b1;
      end
      if (sda_cmd_valid) begin
        pend     <= 1'b1;
        pend_val <= sda_value;
        pend_drv <= sda_drive;
        pend_pp  <= sda_pp;
      end
    end
  end

  assign sda_state     = sda_out;
  assign sda_tribuf_en = enable && sda_drv && (sda_ppm || !sda_out);
  assign scl_state     = scl_out;
  assign scl_tribuf_en = enable;

  // The SDA offset must fall inside the SCL low phase.
  a_offset_in_low: assert property (@(posedge clk) disable iff (!rst_n || !enable)
    (st == S_CLK_LOW) |-> (TW'(sda_offset) < t_low));

endmodule
