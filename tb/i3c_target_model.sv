// i3c_target_model: behavioural I3C / legacy I2C target for testbenches.
//
// Watches SCL and SDA on the system clock, finds START, repeated START and
// STOP, and takes part in transfers by pulling SDA low (open-drain style:
// in this two-state bus model a released line reads 1, so a push-pull high
// and a release look the same). Bits are driven after SCL falls and sampled
// when SCL rises.
//   I3C mode (IS_I2C = 0): ACKs the 0x7E broadcast header, records the
//     broadcast CCC and its data bytes, takes part in ENTDAA (sends its
//     48-bit PID, BCR and DCR with open-drain arbitration, then accepts a
//     dynamic address whose parity is right), answers private writes (stores
//     bytes) and private reads (sends rd_len bytes, T = 1 while more follow),
//     obeys DISEC (broadcast 0x01 or direct 0x81, data bit 0), and raises an
//     in-band interrupt with one data byte when ibi_req is high and it has an
//     address and interrupts are not disabled.
//   I2C mode: answers its static address only, ACKs written bytes, sends
//     bytes until the controller NACKs.
module i3c_target_model #(
  parameter bit         IS_I2C      = 1'b0,
  parameter logic [6:0] STATIC_ADDR = 7'h50,
  parameter logic [47:0] PID        = 48'h0,
  parameter logic [7:0] BCR         = 8'h06,
  parameter logic [7:0] DCR         = 8'h00,
  parameter logic [7:0] IBI_DATA    = 8'hA5
) (
  input  logic clk,
  input  logic scl,
  input  logic sda,
  output logic sda_low,        // pull SDA low
  input  logic ibi_req,
  input  logic [7:0] rd_len,   // bytes offered on a read
  input  logic [7:0] rd_base   // first value offered; byte k is rd_base + k
);

  typedef enum logic [3:0] {
    T_IDLE, T_ADDR, T_ACK_A, T_WR, T_RD, T_DAA_PID, T_DAA_ADDR, T_DAA_ACK,
    T_IBI_ADDR, T_IBI_ACK, T_IBI_DATA, T_WAIT
  } tph_e;

  tph_e       ph, nxt_ph;
  logic       scl_q = 1'b1, sda_q = 1'b1;
  int         bc;
  logic [7:0] sh;
  logic       ack_a;
  logic       drv_one;        // value this target put on the present bit

  // state visible to the testbench
  logic [6:0] dyn_addr = '0;
  logic       dyn_valid = 1'b0;
  logic       ibi_disabled = 1'b0;
  logic [7:0] mem [64];
  int         wr_cnt = 0;
  int         rd_cnt = 0;
  int         rd_ptr = 0;
  logic [7:0] last_ccc = '0;
  logic [7:0] last_ccc_data = '0;
  int         ccc_cnt = 0;
  int         parity_err = 0;
  int         ibi_acked = 0;
  int         ibi_nacked = 0;
  int         daa_lost = 0;
  int         starts = 0;
  int         stops = 0;

  logic       entdaa = 1'b0;
  logic       ccc_next = 1'b0;     // next written byte is a CCC code
  logic       bdisec = 1'b0;       // next byte is broadcast DISEC data
  logic       ddisec = 1'b0;       // direct DISEC seen, waiting for our address
  logic       ddisec_me = 1'b0;    // next byte is our direct DISEC data
  logic       ibi_mode = 1'b0;
  logic       in_bccc = 1'b0;      // data bytes belong to a broadcast CCC
  logic       lost = 1'b0;
  logic [7:0] rd_byte;
  logic [63:0] daa_bits;

  assign daa_bits = {PID, BCR, DCR};
  assign rd_byte  = rd_base + 8'(rd_ptr);

  int idle_cnt = 0;

  initial begin
    sda_low = 1'b0;
    ph      = T_IDLE;
    nxt_ph  = T_IDLE;
    bc      = 0;
    sh      = '0;
    ack_a   = 1'b0;
    drv_one = 1'b1;
  end

  function automatic logic tx_bit(input tph_e p, input int b);
    case (p)
      T_ACK_A:    return !ack_a;
      T_WR:       return (b == 8 && IS_I2C) ? 1'b0 : 1'b1;
      T_RD:       if (b < 8) return rd_byte[7-b];
                  else return IS_I2C ? 1'b1 : (rd_ptr + 1 < int'(rd_len));
      T_DAA_PID:  return lost ? 1'b1 : daa_bits[63-b];
      T_DAA_ACK:  return 1'b0;
      T_IBI_ADDR: return (b < 7) ? dyn_addr[6-b] : 1'b1;
      T_IBI_DATA: return (b < 8) ? IBI_DATA[7-b] : 1'b0;
      default:    return 1'b1;
    endcase
  endfunction

  always @(posedge clk) begin
    automatic logic rise  = scl && !scl_q;
    automatic logic fall  = !scl && scl_q;
    automatic logic start = scl && scl_q && sda_q && !sda;
    automatic logic stop  = scl && scl_q && !sda_q && sda;
    scl_q <= scl;
    sda_q <= sda;
    idle_cnt <= (scl && sda && ph == T_IDLE) ? idle_cnt + 1 : 0;

    if (stop) begin
      stops   <= stops + 1;
      ph      <= T_IDLE;
      sda_low <= 1'b0;
      entdaa  <= 1'b0;
      ccc_next <= 1'b0;
      bdisec  <= 1'b0;
      ddisec  <= 1'b0;
      ddisec_me <= 1'b0;
      ibi_mode <= 1'b0;
      in_bccc <= 1'b0;
    end else if (start) begin
      starts <= starts + 1;
      in_bccc <= 1'b0;
      ccc_next <= 1'b0;
      bc     <= 0;
      lost   <= 1'b0;
      ph     <= ibi_mode ? T_IBI_ADDR : T_ADDR;
      if (!ibi_mode) sda_low <= 1'b0;
    end else if (ph == T_IDLE && !IS_I2C && ibi_req && dyn_valid && !ibi_disabled &&
                 idle_cnt > 20) begin
      // in-band interrupt: pull SDA low on the idle bus
      sda_low  <= 1'b1;
      ibi_mode <= 1'b1;
    end else if (fall) begin
      drv_one <= tx_bit(ph, bc);
      sda_low <= !tx_bit(ph, bc);
    end else if (rise) begin
      automatic logic s = sda;
      case (ph)
        T_ADDR: begin
          sh <= {sh[6:0], s};
          bc <= bc + 1;
          if (bc == 7) begin
            automatic logic [7:0] a = {sh[6:0], s};
            automatic logic ok = 1'b0;
            automatic tph_e np = T_WAIT;
            if (IS_I2C) begin
              if (a[7:1] == STATIC_ADDR) begin ok = 1'b1; np = a[0] ? T_RD : T_WR; end
            end else if (a[7:1] == 7'h7E) begin
              if (!a[0]) begin ok = 1'b1; np = T_WR; ccc_next <= 1'b1; end
              else if (entdaa && !dyn_valid) begin ok = 1'b1; np = T_DAA_PID; end
            end else if (dyn_valid && a[7:1] == dyn_addr) begin
              ok = 1'b1;
              np = a[0] ? T_RD : T_WR;
              if (ddisec && !a[0]) ddisec_me <= 1'b1;
            end
            ack_a  <= ok;
            nxt_ph <= np;
            rd_ptr <= 0;
            ph     <= T_ACK_A;
          end
        end
        T_ACK_A: begin
          bc <= 0;
          ph <= ack_a ? nxt_ph : T_WAIT;
        end
        T_WR: begin
          if (bc < 8) sh <= {sh[6:0], s};
          bc <= bc + 1;
          if (bc == 8) begin
            bc <= 0;
            if (!IS_I2C && (s != ~(^sh))) parity_err <= parity_err + 1;
            if (ccc_next) begin
              ccc_next <= 1'b0;
              last_ccc <= sh;
              ccc_cnt  <= ccc_cnt + 1;
              in_bccc  <= 1'b1;
              if (sh == 8'h07) entdaa <= 1'b1;
              if (sh == 8'h01) bdisec <= 1'b1;
              if (sh == 8'h81) ddisec <= 1'b1;
            end else if (bdisec || ddisec_me) begin
              if (sh[0]) ibi_disabled <= 1'b1;
              last_ccc_data <= sh;
            end else if (ddisec) begin
              last_ccc_data <= sh;
            end else if (in_bccc) begin
              last_ccc_data <= sh;
            end else begin
              mem[wr_cnt[5:0]] <= sh;
              wr_cnt <= wr_cnt + 1;
              last_ccc_data <= sh;
            end
          end
        end
        T_RD: begin
          bc <= bc + 1;
          if (bc == 8) begin
            bc <= 0;
            rd_cnt <= rd_cnt + 1;
            rd_ptr <= rd_ptr + 1;
            if (IS_I2C) ph <= s ? T_WAIT : T_RD;
            else        ph <= (rd_ptr + 1 < int'(rd_len)) ? T_RD : T_WAIT;
          end
        end
        T_DAA_PID: begin
          if (drv_one && !s && !lost) begin
            lost <= 1'b1;
            daa_lost <= daa_lost + 1;
          end
          bc <= bc + 1;
          if (bc == 63) begin
            bc <= 0;
            ph <= (lost || (drv_one && !s)) ? T_WAIT : T_DAA_ADDR;
          end
        end
        T_DAA_ADDR: begin
          sh <= {sh[6:0], s};
          bc <= bc + 1;
          if (bc == 7) begin
            if (s == ~(^sh[6:0])) begin
              dyn_addr <= sh[6:0];
              ph <= T_DAA_ACK;
            end else ph <= T_WAIT;
          end
        end
        T_DAA_ACK: begin
          dyn_valid <= 1'b1;
          ph <= T_WAIT;
        end
        T_IBI_ADDR: begin
          bc <= bc + 1;
          if (bc == 7) ph <= T_IBI_ACK;
        end
        T_IBI_ACK: begin
          bc <= 0;
          ibi_mode <= 1'b0;
          if (!s) begin
            ibi_acked <= ibi_acked + 1;
            ph <= T_IBI_DATA;
          end else begin
            ibi_nacked <= ibi_nacked + 1;
            ph <= T_WAIT;
          end
        end
        T_IBI_DATA: begin
          bc <= bc + 1;
          if (bc == 8) ph <= T_WAIT;
        end
        default: ;
      endcase
    end
  end

endmodule
