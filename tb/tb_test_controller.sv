// tb_test_controller: self-checking testbench for test_controller.
//
// Plays the host: sends 16 key bytes, 16 plaintext bytes, a byte that is not
// the start command (must be ignored) and the start command. A stand-in for the
// AES core answers aes_start after a random delay with a ciphertext that the
// testbench derives from key and plaintext (any function will do here). The
// transmitter side applies random back-pressure on tx_ready. Checks: key and
// plaintext as received, det_rst high for exactly DET_RST_CYCLES cycles, the
// trigger rising REARM_CYCLES cycles after det_rst, trigger
// high for exactly TRIG_CYCLES cycles before aes_start, aes_start one cycle,
// the 16 ciphertext bytes in order, and the status byte: no alarm, an alarm
// pulse inside the watched window, and an alarm pulse before the trigger
// (outside the window, must not count).
`timescale 1ns/1ps
module tb_test_controller;
  import emp_pkg::*;

  localparam int unsigned TRIG  = 4;
  localparam int unsigned REARM = 2;   // det_rst cycles (DET_RST_CYCLES)

  logic                clk = 1'b0;
  logic                rst = 1'b0;
  logic                rx_valid = 1'b0;
  logic [7:0]          rx_data = '0;
  logic                tx_valid, tx_ready;
  logic [7:0]          tx_data;
  logic [AES_BITS-1:0] aes_key, aes_pt, aes_ct;
  logic                aes_start, aes_done;
  logic                trigger, det_rst, alarm_seen;
  logic                global_alarm_n = ALARM_OK;
  int                  checks = 0, failures = 0;

  test_controller dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  // AES stand-in: done 8..23 cycles after start.
  initial begin
    aes_done = 1'b0;
    aes_ct   = '0;
    forever begin
      @(posedge clk);
      if (aes_start) begin
        repeat (8 + $urandom_range(0, 15)) @(posedge clk);
        #1 aes_ct = {aes_key[63:0], aes_key[127:64]} ^ ~aes_pt;
        aes_done = 1'b1;
        @(posedge clk); #1 aes_done = 1'b0;
      end
    end
  end

  // Random back-pressure.
  always @(negedge clk) tx_ready = ($urandom_range(0, 2) != 0);

  // Cycle counters for the pins.
  int trig_cycles, rearm_cycles, start_pulses, trig_before_start;
  int since_rearm, rearm_to_trigger;
  logic det_rst_d = 1'b0, trigger_d = 1'b0;
  always @(posedge clk) begin
    det_rst_d <= det_rst;
    trigger_d <= trigger;
    if (det_rst && !det_rst_d) since_rearm = 0;
    else since_rearm++;
    if (trigger && !trigger_d) rearm_to_trigger = since_rearm;
    if (trigger) trig_cycles++;
    if (det_rst) rearm_cycles++;
    if (aes_start) begin
      start_pulses++;
      trig_before_start = trig_cycles;
    end
  end

  task automatic send_byte(input logic [7:0] b);
    @(negedge clk);
    rx_valid = 1'b1; rx_data = b;
    @(negedge clk);
    rx_valid = 1'b0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  task automatic recv_byte(output logic [7:0] b);
    forever begin
      @(posedge clk);
      if (tx_valid && tx_ready) begin
        b = tx_data;
        break;
      end
    end
  endtask

  // One experiment. alarm_at: 0 none, 1 pulse during ciphering, 2 pulse while
  // the key is being received.
  task automatic run(input int alarm_at, input string name);
    logic [AES_BITS-1:0] key, pt, exp_ct;
    logic [7:0] b;
    key = {$urandom, $urandom, $urandom, $urandom};
    pt  = {$urandom, $urandom, $urandom, $urandom};
    trig_cycles = 0; rearm_cycles = 0; start_pulses = 0; trig_before_start = -1;
    for (int i = 0; i < AES_BYTES; i++) begin
      send_byte(key[AES_BITS-1-8*i -: 8]);
      if (alarm_at == 2 && i == 3) begin
        @(negedge clk) global_alarm_n = ALARM_RAISED;
        @(negedge clk) global_alarm_n = ALARM_OK;
      end
    end
    for (int i = 0; i < AES_BYTES; i++) send_byte(pt[AES_BITS-1-8*i -: 8]);
    send_byte(8'hA5);           // not a start command: ignored
    check(trigger, 1'b0, {name, ": no trigger before the command"});
    send_byte(CMD_START);
    check(aes_key == key, 1'b1, {name, ": key received"});
    check(aes_pt == pt, 1'b1, {name, ": plaintext received"});
    exp_ct = {key[63:0], key[127:64]} ^ ~pt;
    if (alarm_at == 1) begin
      wait (aes_start);
      repeat (3) @(negedge clk);
      global_alarm_n = ALARM_RAISED;
      @(negedge clk) global_alarm_n = ALARM_OK;
    end
    for (int i = 0; i < AES_BYTES; i++) begin
      recv_byte(b);
      check(b == exp_ct[AES_BITS-1-8*i -: 8], 1'b1, $sformatf("%s: ciphertext byte %0d", name, i));
    end
    recv_byte(b);
    check(b == ((alarm_at == 1) ? STATUS_ALARM : STATUS_NO_ALARM), 1'b1, {name, ": status byte"});
    check(rearm_cycles == REARM, 1'b1, {name, ": re-arm length"});
    check(trig_cycles == TRIG, 1'b1, {name, ": trigger length"});
    check(rearm_to_trigger == 5, 1'b1, {name, ": trigger rises REARM_CYCLES after the re-arm starts"});
    check(trig_before_start == TRIG, 1'b1, {name, ": trigger precedes aes_start"});
    check(start_pulses == 1, 1'b1, {name, ": one aes_start pulse"});
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    #1 check(trigger, 1'b0, "reset trigger");
    check(det_rst, 1'b0, "reset det_rst");
    check(tx_valid, 1'b0, "reset tx_valid");
    @(negedge clk) rst = 1'b0;
    run(0, "clean run");
    run(1, "alarm during ciphering");
    run(2, "alarm before trigger");
    run(0, "clean run again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
