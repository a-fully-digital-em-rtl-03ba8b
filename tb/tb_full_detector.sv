// tb_full_detector: self-checking testbench for full_detector.
//
// A reference model counts clock edges and predicts the four sensing
// flip-flops (pair 1 starts at Q1=1/Q2=0, pair 2 at Q1=0/Q2=1). Checks: the
// alarm stays at 1 for a long fault-free run; each of the four sensing
// flip-flops, upset in turn (bit flips while the clock is stable and missed
// toggles across an edge, covering both edges and both directions of Q),
// drives the alarm to 0 at the first rising edge after the upset and keeps it
// there until reset; an upset of the alarm flip-flop gives a one-cycle alarm.
`timescale 1ns/1ps
module tb_full_detector;
  import emp_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b0;
  logic alarm_n;
  logic fv;
  int   checks = 0, failures = 0;
  int   rises = 0, falls = 0;
  int   detected = 0;

  full_detector dut (.clk(clk), .rst(rst), .alarm_n(alarm_n));

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) rises++;
  always @(negedge clk) if (!rst) falls++;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  task automatic check_pattern(input string what);
    check(dut.hd1_q1, 1'b1 ^ rises[0], {what, " hd1.q1"});
    check(dut.hd1_q2, 1'b0 ^ falls[0], {what, " hd1.q2"});
    check(dut.hd2_q1, 1'b0 ^ rises[0], {what, " hd2.q1"});
    check(dut.hd2_q2, 1'b1 ^ falls[0], {what, " hd2.q2"});
  endtask

  task automatic do_reset();
    @(negedge clk);
    #2 rst = 1'b1;
    @(posedge clk); @(negedge clk);
    #2 rst = 1'b0;
    #1 rises = 0; falls = 0;
  endtask

  // After an upset: alarm must fall at the first rising edge and stay low.
  task automatic expect_sticky_alarm(input string what);
    @(posedge clk); #1;
    check(alarm_n, ALARM_RAISED, {what, ": alarm at first rising edge"});
    if (alarm_n == ALARM_RAISED) detected++;
    repeat (12) begin
      @(posedge clk); #1;
      check(alarm_n, ALARM_RAISED, {what, ": alarm held"});
    end
    do_reset();
    repeat (4) begin
      @(posedge clk); #1;
      check(alarm_n, ALARM_OK, {what, ": re-armed"});
    end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    #2 check(alarm_n, ALARM_OK, "reset alarm");
    check_pattern("reset");
    @(negedge clk); #2 rst = 1'b0;
    #1 rises = 0; falls = 0;

    // fault-free run
    repeat (100) begin
      @(posedge clk); #2;
      check(alarm_n, ALARM_OK, "quiet");
      check_pattern("quiet hi");
      @(negedge clk); #2;
      check_pattern("quiet lo");
    end

    // pair 1, Q1 misses a rising-edge toggle (Q1 was 1: rising edge, Q falling)
    while (dut.hd1_q1 != 1'b1) @(negedge clk);
    #2 fv = 1'b1; force dut.u_hd1.u_pair.q1 = fv;
    @(posedge clk); #2 release dut.u_hd1.u_pair.q1;
    check(alarm_n, ALARM_OK, "hd1.q1 miss: sampled before the miss");
    expect_sticky_alarm("hd1.q1 missed toggle (rise edge, Q falling)");

    // pair 2, Q1 misses a rising-edge toggle (Q1 was 0: rising edge, Q rising)
    while (dut.hd2_q1 != 1'b0) @(negedge clk);
    #2 fv = 1'b0; force dut.u_hd2.u_pair.q1 = fv;
    @(posedge clk); #2 release dut.u_hd2.u_pair.q1;
    check(alarm_n, ALARM_OK, "hd2.q1 miss: sampled before the miss");
    expect_sticky_alarm("hd2.q1 missed toggle (rise edge, Q rising)");

    // pair 1, Q2 misses a falling-edge toggle
    @(posedge clk); #2 fv = dut.hd1_q2; force dut.u_hd1.u_pair.q2 = fv;
    @(negedge clk); #2 release dut.u_hd1.u_pair.q2;
    expect_sticky_alarm("hd1.q2 missed toggle (fall edge)");

    // pair 2, Q2 bit flip while the clock is high
    @(posedge clk); #2 fv = ~dut.hd2_q2; force dut.u_hd2.u_pair.q2 = fv;
    #1 release dut.u_hd2.u_pair.q2;
    expect_sticky_alarm("hd2.q2 bit flip");

    // alarm flip-flop upset: one-cycle alarm only
    @(negedge clk); #2 fv = ALARM_RAISED; force dut.alarm_n = fv;
    #1 release dut.alarm_n;
    check(alarm_n, ALARM_RAISED, "alarm ff upset visible");
    if (alarm_n == ALARM_RAISED) detected++;
    @(posedge clk); #1;
    check(alarm_n, ALARM_OK, "alarm ff upset lasts one cycle");
    repeat (10) begin @(posedge clk); #1; check(alarm_n, ALARM_OK, "quiet after alarm ff upset"); end

    check(detected == 5, 1'b1, "all five upsets detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
