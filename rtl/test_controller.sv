// test_controller: the finite state machine of the EM pulse detector test chip.
//
// It runs one ciphering experiment at a time:
//   1. ST_KEY / ST_PT: takes 16 key bytes and then 16 plaintext bytes from the
//      serial receiver, most significant byte first (byte 0 of FIPS 197 first).
//   2. ST_CMD: waits for the start command CMD_START; other bytes are ignored.
//   3. ST_REARM: lasts REARM_CYCLES cycles. det_rst is high for the first
//      DET_RST_CYCLES of them, which re-arms all detectors (their alarms are
//      sticky) and the alarm mesh. The remaining cycles cover the detector
//      reset release, which the chip delays by up to two cycles to a falling
//      clock edge, so every detector is armed when the trigger rises.
//   4. ST_TRIG: drives the trigger pin high for TRIG_CYCLES cycles. The trigger
//      fires the external pulse generator before the ciphering starts. On the
//      last trigger cycle aes_start is pulsed for one cycle.
//   5. ST_CIPHER: waits for aes_done and captures aes_ct.
//   6. ST_SEND_CT / ST_SEND_ST: returns the 16 ciphertext bytes, most
//      significant first, and one status byte (STATUS_ALARM if the global alarm
//      was low at any cycle from the start of the trigger to the status byte,
//      else STATUS_NO_ALARM). Then it returns to ST_KEY.
//
// Interfaces: rx_valid/rx_data is a one-cycle strobe per received byte;
// tx_valid/tx_ready/tx_data is a valid/ready handshake (a byte moves when both
// are high, and tx_data is held while tx_valid waits for tx_ready);
// aes_start is a one-cycle pulse, aes_done is sampled only in ST_CIPHER.
// rst is asynchronous and active high.
//
// Follows the paper: the order key, plaintext, start command; the trigger
// pin raised before the ciphering; ciphertext and alarm state returned at the
// end. This design's own choices: the byte framing, the command value, the
// re-arm step, the trigger length and the status byte.
module test_controller
  import emp_pkg::*;
#(
  parameter int unsigned TRIG_CYCLES  = 4,
  parameter int unsigned REARM_CYCLES   = 5,
  parameter int unsigned DET_RST_CYCLES = 2
) (
  input  logic                clk,
  input  logic                rst,
  // serial receiver side
  input  logic                rx_valid,
  input  logic [7:0]          rx_data,
  // serial transmitter side
  output logic                tx_valid,
  output logic [7:0]          tx_data,
  input  logic                tx_ready,
  // AES core side
  output logic [AES_BITS-1:0] aes_key,
  output logic [AES_BITS-1:0] aes_pt,
  output logic                aes_start,
  input  logic                aes_done,
  input  logic [AES_BITS-1:0] aes_ct,
  // experiment control
  output logic                trigger,
  output logic                det_rst,
  input  logic                global_alarm_n,
  output logic                alarm_seen
);

  localparam int unsigned CW = $clog2(AES_BYTES + TRIG_CYCLES + REARM_CYCLES + 1);

  ctrl_state_t         state;
  logic [CW-1:0]       cnt;
  logic [AES_BITS-1:0] ct_sr;
  logic                tx_fire;
  logic                watch;

  assign tx_fire = tx_valid & tx_ready;
  assign tx_valid = (state == ST_SEND_CT) || (state == ST_SEND_ST);
  assign tx_data  = (state == ST_SEND_ST)
                    ? ((alarm_seen || (global_alarm_n == ALARM_RAISED)) ? STATUS_ALARM : STATUS_NO_ALARM)
                    : ct_sr[AES_BITS-1 -: 8];
  assign trigger  = (state == ST_TRIG);
  // The alarm is watched from the first trigger cycle to the status byte.
  assign watch    = (state == ST_TRIG) || (state == ST_CIPHER) || (state == ST_SEND_CT);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state      <= ST_KEY;
      cnt        <= '0;
      aes_key    <= '0;
      aes_pt     <= '0;
      ct_sr      <= '0;
      aes_start  <= 1'b0;
      det_rst    <= 1'b0;
      alarm_seen <= 1'b0;
    end else begin
      aes_start <= 1'b0;
      if (watch && global_alarm_n == ALARM_RAISED) alarm_seen <= 1'b1;
      unique case (state)
        ST_KEY: if (rx_valid) begin
          aes_key <= {aes_key[AES_BITS-9:0], rx_data};
          if (cnt == CW'(AES_BYTES - 1)) begin
            cnt   <= '0;
            state <= ST_PT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_PT: if (rx_valid) begin
          aes_pt <= {aes_pt[AES_BITS-9:0], rx_data};
          if (cnt == CW'(AES_BYTES - 1)) begin
            cnt   <= '0;
            state <= ST_CMD;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_CMD: if (rx_valid && rx_data == CMD_START) begin
          state      <= ST_REARM;
          det_rst    <= 1'b1;
          alarm_seen <= 1'b0;
          cnt        <= '0;
        end
        ST_REARM: begin
          if (cnt == CW'(DET_RST_CYCLES - 1)) det_rst <= 1'b0;
          if (cnt == CW'(REARM_CYCLES - 1)) begin
            cnt   <= '0;
            state <= ST_TRIG;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_TRIG: begin
          if (cnt == CW'(TRIG_CYCLES - 1)) begin
            cnt       <= '0;
            aes_start <= 1'b1;
            state     <= ST_CIPHER;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_CIPHER: if (aes_done) begin
          ct_sr <= aes_ct;
          state <= ST_SEND_CT;
        end
        ST_SEND_CT: if (tx_fire) begin
          ct_sr <= {ct_sr[AES_BITS-9:0], 8'h00};
          if (cnt == CW'(AES_BYTES - 1)) begin
            cnt   <= '0;
            state <= ST_SEND_ST;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_SEND_ST: if (tx_fire) begin
          state <= ST_KEY;
        end
        default: state <= ST_KEY;
      endcase
    end
  end

  // Handshake rules.
  a_tx_stable: assert property (@(posedge clk) disable iff (rst)
    tx_valid && !tx_ready |=> tx_valid && $stable(tx_data))
    else $error("tx_data changed while waiting for tx_ready");
  a_start_pulse: assert property (@(posedge clk) disable iff (rst)
    aes_start |=> !aes_start)
    else $error("aes_start longer than one cycle");

endmodule
