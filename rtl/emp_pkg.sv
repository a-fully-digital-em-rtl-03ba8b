// emp_pkg: constants and types shared by the EM pulse detector and its test chip.
//
// Every detector alarm in this design is active low, as in the detector
// schematics: the alarm flip-flops power up and reset to 1 and fall to 0 when a
// disturbance is seen. ALARM_OK / ALARM_RAISED name the two levels.
//
// The test-chip controller talks to a byte-wide serial link. The frame it
// expects (16 key bytes, 16 plaintext bytes, one command byte) and the value of
// the start command are this design's own choice; the paper only says that
// the chip waits for a key, a plaintext and a start command, in that order.
package emp_pkg;

  localparam logic ALARM_OK     = 1'b1;
  localparam logic ALARM_RAISED = 1'b0;

  // AES-128 block and key width (FIPS 197).
  localparam int unsigned AES_BITS  = 128;
  localparam int unsigned AES_BYTES = AES_BITS / 8;

  // Command byte that starts a ciphering run.
  localparam logic [7:0] CMD_START = 8'h01;

  // Status byte sent after the ciphertext.
  localparam logic [7:0] STATUS_NO_ALARM = 8'h00;
  localparam logic [7:0] STATUS_ALARM    = 8'h01;

  typedef enum logic [2:0] {
    ST_KEY,      // receiving key bytes
    ST_PT,       // receiving plaintext bytes
    ST_CMD,      // waiting for the start command
    ST_REARM,    // re-arming the detectors (held in reset)
    ST_TRIG,     // trigger pin high, detectors armed
    ST_CIPHER,   // AES running
    ST_SEND_CT,  // returning ciphertext bytes
    ST_SEND_ST   // returning the alarm status byte
  } ctrl_state_t;

endpackage
