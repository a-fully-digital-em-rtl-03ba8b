// tb_emp_testchip: end-to-end testbench of the test chip at its default size
// (37 detectors, no parameter overrides).
//
// Plays the host and the attached parts: sends key, plaintext and the start
// command as 8N1 frames on the serial line (868 clock cycles per bit), answers
// aes_start with a stand-in AES result after a random delay, decodes the
// returned frames on the serial output, and fires
// "EM pulses" by forcing flip-flops of chosen detectors. Experiments:
//   - clean runs: no pulse, status must say no alarm, global alarm stays 1;
//   - a pulse that makes a sensing flip-flop of one detector miss a toggle
//     during the ciphering (detectors 0, 17 and 36, both half detectors,
//     both clock edges): status must say alarm, and the global alarm must
//     stay low until the next run re-arms the detectors;
//   - a pulse that flips the alarm flip-flop of a detector: a one-cycle alarm,
//     which the controller must still record;
//   - a pulse before the run (while the key is sent): the detector latches
//     it, but the re-arm at the start command clears it, so the run reports
//     no alarm.
// Each mechanism is counted; one that never happened counts as a failure.
`timescale 1ns/1ps
module tb_emp_testchip;
  import emp_pkg::*;

  logic                clk = 1'b0;
  logic                rst = 1'b0;
  localparam int unsigned CPB = 868;
  logic                uart_rxd = 1'b1;
  logic                uart_txd, rx_frame_err;
  logic [AES_BITS-1:0] aes_key, aes_pt, aes_ct;
  logic                aes_start, aes_done;
  logic                trigger, global_alarm_n, alarm_latched;
  logic                fv;
  int                  checks = 0, failures = 0;

  // mechanism counters
  int n_clean = 0, n_sense_detect = 0, n_alarm_ff_detect = 0, n_rearm_clear = 0;
  int n_sticky = 0, n_stall = 0, n_trigger = 0, n_cmd_ignored = 0;

  emp_testchip dut (.*);

  always #5 clk = ~clk;   // 100 MHz

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  // AES stand-in: answers 10..40 cycles after aes_start.
  initial begin
    aes_done = 1'b0;
    aes_ct   = '0;
    forever begin
      @(posedge clk);
      if (aes_start) begin
        repeat (10 + $urandom_range(0, 30)) @(posedge clk);
        #1 aes_ct = aes_key ^ {aes_pt[7:0], aes_pt[127:8]};
        aes_done = 1'b1;
        @(posedge clk); #1 aes_done = 1'b0;
      end
    end
  end

  // The controller waiting for the transmitter (a stall of the reply).
  always @(posedge clk) begin
    if (dut.tx_valid && !dut.tx_ready) n_stall++;
  end
  logic trig_d = 1'b0;
  always @(posedge clk) begin
    trig_d <= trigger;
    if (trigger && !trig_d) n_trigger++;
  end

  task automatic send_byte(input logic [7:0] b);
    @(negedge clk) uart_rxd = 1'b0;
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      uart_rxd = b[i];
      repeat (CPB) @(negedge clk);
    end
    uart_rxd = 1'b1;
    repeat (CPB) @(negedge clk);
  endtask

  // Line decoder, always running: wait for a start bit, sample each bit in
  // its middle, queue the byte.
  logic [7:0] reply_q[$];
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      repeat (CPB / 2) @(posedge clk);
      check(uart_txd, 1'b0, "reply start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (CPB) @(posedge clk);
      check(uart_txd, 1'b1, "reply stop bit");
      reply_q.push_back(b);
    end
  end

  task automatic recv_byte(output logic [7:0] b);
    while (reply_q.size() == 0) @(posedge clk);
    b = reply_q.pop_front();
  endtask

  // EM pulse models on one detector. kind: 0 pair-1 Q1 misses a rising-edge
  // toggle, 1 pair-2 Q2 misses a falling-edge toggle, 2 alarm flip-flop flip,
  // 3 pair-2 Q1 bit flip while the clock is stable.
  task automatic pulse(input int det, input int kind);
    case (kind)
      0: begin
        @(negedge clk); #2;
        case (det)
          0:  begin fv = dut.g_det[0].u_det.hd1_q1;  force dut.g_det[0].u_det.u_hd1.u_pair.q1 = fv;  end
          17: begin fv = dut.g_det[17].u_det.hd1_q1; force dut.g_det[17].u_det.u_hd1.u_pair.q1 = fv; end
          default: begin fv = dut.g_det[36].u_det.hd1_q1; force dut.g_det[36].u_det.u_hd1.u_pair.q1 = fv; end
        endcase
        @(posedge clk); #2;
        release dut.g_det[0].u_det.u_hd1.u_pair.q1;
        release dut.g_det[17].u_det.u_hd1.u_pair.q1;
        release dut.g_det[36].u_det.u_hd1.u_pair.q1;
      end
      1: begin
        @(posedge clk); #2;
        case (det)
          0:  begin fv = dut.g_det[0].u_det.hd2_q2;  force dut.g_det[0].u_det.u_hd2.u_pair.q2 = fv;  end
          17: begin fv = dut.g_det[17].u_det.hd2_q2; force dut.g_det[17].u_det.u_hd2.u_pair.q2 = fv; end
          default: begin fv = dut.g_det[36].u_det.hd2_q2; force dut.g_det[36].u_det.u_hd2.u_pair.q2 = fv; end
        endcase
        @(negedge clk); #2;
        release dut.g_det[0].u_det.u_hd2.u_pair.q2;
        release dut.g_det[17].u_det.u_hd2.u_pair.q2;
        release dut.g_det[36].u_det.u_hd2.u_pair.q2;
      end
      2: begin
        @(negedge clk); #2 fv = ALARM_RAISED;
        case (det)
          0:  force dut.g_det[0].u_det.alarm_n = fv;
          17: force dut.g_det[17].u_det.alarm_n = fv;
          default: force dut.g_det[36].u_det.alarm_n = fv;
        endcase
        #1;
        release dut.g_det[0].u_det.alarm_n;
        release dut.g_det[17].u_det.alarm_n;
        release dut.g_det[36].u_det.alarm_n;
      end
      default: begin
        @(posedge clk); #2;
        case (det)
          0:  begin fv = ~dut.g_det[0].u_det.hd2_q1;  force dut.g_det[0].u_det.u_hd2.u_pair.q1 = fv;  end
          17: begin fv = ~dut.g_det[17].u_det.hd2_q1; force dut.g_det[17].u_det.u_hd2.u_pair.q1 = fv; end
          default: begin fv = ~dut.g_det[36].u_det.hd2_q1; force dut.g_det[36].u_det.u_hd2.u_pair.q1 = fv; end
        endcase
        #1;
        release dut.g_det[0].u_det.u_hd2.u_pair.q1;
        release dut.g_det[17].u_det.u_hd2.u_pair.q1;
        release dut.g_det[36].u_det.u_hd2.u_pair.q1;
      end
    endcase
  endtask

  // One experiment. when: 0 no pulse, 1 pulse during the ciphering,
  // 2 pulse while the key is being sent.
  task automatic run(input int when, input int det, input int kind, input string name);
    logic [AES_BITS-1:0] key, pt, exp_ct;
    logic [7:0] b;
    logic       exp_alarm;
    key = {$urandom, $urandom, $urandom, $urandom};
    pt  = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < AES_BYTES; i++) begin
      send_byte(key[AES_BITS-1-8*i -: 8]);
      if (when == 2 && i == 5) begin
        pulse(det, kind);
        repeat (3) @(posedge clk);
        #1 check(global_alarm_n, ALARM_RAISED, {name, ": early pulse seen by the mesh"});
      end
    end
    for (int i = 0; i < AES_BYTES; i++) send_byte(pt[AES_BITS-1-8*i -: 8]);
    send_byte(8'h5A);
    repeat (20) @(posedge clk);
    if (trigger == 1'b0 && dut.u_ctrl.state == ST_CMD) n_cmd_ignored++;
    fork
      send_byte(CMD_START);
      begin
        wait (aes_start);
      end
    join
    check(aes_key == key && aes_pt == pt, 1'b1, {name, ": key and plaintext at the AES"});
    exp_ct = key ^ {pt[7:0], pt[127:8]};
    exp_alarm = (when == 1);
    if (when == 1) begin
      repeat (4) @(posedge clk);
      pulse(det, kind);
    end
    for (int i = 0; i < AES_BYTES; i++) begin
      recv_byte(b);
      check(b == exp_ct[AES_BITS-1-8*i -: 8], 1'b1, $sformatf("%s: ciphertext byte %0d", name, i));
    end
    recv_byte(b);
    check(b == (exp_alarm ? STATUS_ALARM : STATUS_NO_ALARM), 1'b1, {name, ": status byte"});
    if (when == 0) begin
      check(global_alarm_n, ALARM_OK, {name, ": global alarm quiet"});
      if (b == STATUS_NO_ALARM) n_clean++;
    end
    if (when == 1) begin
      if (b == STATUS_ALARM) begin
        if (kind == 2) n_alarm_ff_detect++; else n_sense_detect++;
      end
      // A sensing flip-flop upset keeps the global alarm low; an alarm
      // flip-flop upset is gone after one cycle.
      check(global_alarm_n, (kind == 2) ? ALARM_OK : ALARM_RAISED, {name, ": global alarm level after the run"});
      if (kind != 2 && global_alarm_n == ALARM_RAISED) n_sticky++;
    end
    if (when == 2 && b == STATUS_NO_ALARM) n_rearm_clear++;
  endtask

  initial begin : watchdog
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    #3 rst = 1'b0;                       // released while the clock is high
    repeat (10) @(posedge clk);
    #1 check(global_alarm_n, ALARM_OK, "no false alarm after reset");

    run(0, 0, 0, "clean run 1");
    run(1, 0, 0, "det 0 pair-1 Q1 missed rise toggle");
    run(0, 0, 0, "clean run 2");
    run(1, 17, 1, "det 17 pair-2 Q2 missed fall toggle");
    run(1, 36, 3, "det 36 pair-2 Q1 bit flip");
    run(1, 17, 2, "det 17 alarm flip-flop flip");
    run(2, 36, 0, "det 36 pulse before the run");
    run(0, 0, 0, "clean run 3");

    check(n_clean == 3, 1'b1, "clean runs");
    check(n_sense_detect == 3, 1'b1, "sensing flip-flop upsets detected");
    check(n_sticky == 3, 1'b1, "sticky alarms");
    check(n_alarm_ff_detect == 1, 1'b1, "alarm flip-flop upset detected");
    check(n_rearm_clear == 1, 1'b1, "re-arm cleared an earlier alarm");
    check(n_trigger == 8, 1'b1, "one trigger per run");
    check(n_cmd_ignored == 8, 1'b1, "non-start bytes ignored");
    check(n_stall > 0, 1'b1, "controller waited for the transmitter");
    check(rx_frame_err == 1'b0, 1'b1, "no framing error");
    $display("mechanisms: clean=%0d sense=%0d sticky=%0d alarm_ff=%0d rearm_clear=%0d triggers=%0d stalls=%0d",
             n_clean, n_sense_detect, n_sticky, n_alarm_ff_detect, n_rearm_clear, n_trigger, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
