// tb_half_detector: self-checking testbench for half_detector.
//
// Runs both initialisations (INIT_Q1 = 1 as the first half detector, 0 as the
// second) side by side, and the variant without DFF3 (ALARM_FF = 0) whose
// output is the XOR of the pair. A reference model counts rising and falling clock
// edges and predicts q1, q2 and the alarm. EM pulse effects are modelled by
// forcing the sensing flip-flops: a bit flip while the clock is stable, a
// missed toggle across a clock edge, and a flip of the alarm flip-flop itself.
// Checks: the toggle pattern, the alarm held at 1 without a fault, the alarm
// falling at the first rising edge after a fault and staying low (sticky)
// until reset, the one-cycle alarm from a flipped alarm flip-flop, and the
// return to normal after reset.
`timescale 1ns/1ps
module tb_half_detector;
  import emp_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b0;
  logic fv;                    // value held by a force
  logic alarm_a, q1_a, q2_a;   // INIT_Q1 = 1
  logic alarm_b, q1_b, q2_b;   // INIT_Q1 = 0
  int   checks = 0, failures = 0;
  int   rises = 0, falls = 0;

  half_detector #(.INIT_Q1(1'b1)) dut_a (.clk(clk), .rst(rst), .alarm_n(alarm_a), .q1(q1_a), .q2(q2_a));
  half_detector #(.INIT_Q1(1'b0)) dut_b (.clk(clk), .rst(rst), .alarm_n(alarm_b), .q1(q1_b), .q2(q2_b));
  // Variant used inside the full detector: no DFF3, alarm_n is the XOR.
  logic ok_c, q1_c, q2_c;
  half_detector #(.INIT_Q1(1'b1), .ALARM_FF(1'b0)) dut_c (.clk(clk), .rst(rst), .alarm_n(ok_c), .q1(q1_c), .q2(q2_c));

  always #5 clk = ~clk;   // 100 MHz

  always @(posedge clk) if (!rst) rises++;
  always @(negedge clk) if (!rst) falls++;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  // Pattern check of both detectors, sampled in the middle of each half period.
  task automatic check_pattern(input string what);
    check(q1_a, 1'b1 ^ rises[0],  {what, " a.q1"});
    check(q2_a, 1'b0 ^ falls[0],  {what, " a.q2"});
    check(q1_b, 1'b0 ^ rises[0],  {what, " b.q1"});
    check(q2_b, 1'b1 ^ falls[0],  {what, " b.q2"});
  endtask

  task automatic do_reset();
    @(negedge clk);
    #2 rst = 1'b1;
    #1 rises = 0; falls = 0;
    @(posedge clk); @(negedge clk);
    #2 rst = 1'b0;   // released while the clock is low: first edge is rising
    #1 rises = 0; falls = 0;
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    // ---- reset values
    #1 rst = 1'b1;
    #2;
    check(q1_a, 1'b1, "reset a.q1"); check(q2_a, 1'b0, "reset a.q2"); check(alarm_a, ALARM_OK, "reset a.alarm");
    check(q1_b, 1'b0, "reset b.q1"); check(q2_b, 1'b1, "reset b.q2"); check(alarm_b, ALARM_OK, "reset b.alarm");
    @(negedge clk); #2 rst = 1'b0;

    // ---- normal operation: 40 cycles, toggle pattern and quiet alarm
    repeat (40) begin
      @(posedge clk); #2;
      check_pattern("run hi");
      check(alarm_a, ALARM_OK, "quiet a"); check(alarm_b, ALARM_OK, "quiet b");
      check(ok_c, 1'b0, "c pair equal after rising edge");
      @(negedge clk); #2;
      check_pattern("run lo");
      check(ok_c, 1'b1, "c pair opposite before rising edge");
    end

    // ---- fault 1: bit flip of DFF1 while the clock is low (detector a)
    @(negedge clk); #2;
    fv = ~q1_a;
    force dut_a.u_pair.q1 = fv;
    #1 release dut_a.u_pair.q1;
    check(alarm_a, ALARM_OK, "a alarm before edge");
    @(posedge clk); #1;
    check(alarm_a, ALARM_RAISED, "a alarm one edge after q1 flip");
    check(alarm_b, ALARM_OK, "b untouched by a's fault");
    repeat (20) begin
      @(posedge clk); #1;
      check(alarm_a, ALARM_RAISED, "a alarm sticky");
      @(negedge clk); #2;
      check(q1_a ^ q2_a, 1'b0, "a pair in phase before the rising edge");
    end
    do_reset();
    repeat (3) begin @(posedge clk); #1; check(alarm_a, ALARM_OK, "a re-armed"); end

    // ---- fault 2: DFF2 misses its toggle at a falling edge (detector b)
    @(posedge clk); #2;
    fv = q2_b;
    force dut_b.u_pair.q2 = fv;
    @(negedge clk); #2;
    release dut_b.u_pair.q2;
    lat = 0;
    while (alarm_b == ALARM_OK && lat < 10) begin @(posedge clk); #1; lat++; end
    check(lat == 1, 1'b1, "b alarm at first rising edge after missed falling-edge toggle");
    repeat (10) begin @(posedge clk); #1; check(alarm_b, ALARM_RAISED, "b alarm sticky"); end
    check(alarm_a, ALARM_OK, "a untouched by b's fault");
    do_reset();

    // ---- fault 3: DFF1 misses its toggle at a rising edge (detector a)
    @(negedge clk); #2;
    fv = q1_a;
    force dut_a.u_pair.q1 = fv;
    @(posedge clk); #2;
    release dut_a.u_pair.q1;
    check(alarm_a, ALARM_OK, "a alarm sampled before the missed toggle");
    @(posedge clk); #1;
    check(alarm_a, ALARM_RAISED, "a alarm after missed rising-edge toggle");
    do_reset();

    // ---- fault 4: flip of the alarm flip-flop itself: one-cycle alarm
    @(negedge clk); #2;
    force dut_b.alarm_n = ALARM_RAISED;
    #1 release dut_b.alarm_n;
    check(alarm_b, ALARM_RAISED, "b alarm flip-flop upset visible");
    @(posedge clk); #1;
    check(alarm_b, ALARM_OK, "b alarm flip-flop upset lasts one cycle");
    repeat (10) begin
      @(posedge clk); #2;
      check(alarm_b, ALARM_OK, "b quiet after alarm flip-flop upset");
      check_pattern("after fault 4");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
