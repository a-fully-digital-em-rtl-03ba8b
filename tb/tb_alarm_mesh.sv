// tb_alarm_mesh: self-checking testbench for alarm_mesh at its default size
// (37 detectors).
//
// Drives every single-detector alarm in turn, all alarms quiet, all raised and
// random patterns, and checks the global alarm one clock cycle later against
// the expectation "low if any detector is low". Also checks the reset value
// and that a one-cycle detector alarm gives exactly a one-cycle global alarm.
`timescale 1ns/1ps
module tb_alarm_mesh;
  import emp_pkg::*;

  localparam int unsigned N = 37;

  logic         clk = 1'b0;
  logic         rst = 1'b0;
  logic [N-1:0] alarm_n_in;
  logic         global_alarm_n;
  int           checks = 0, failures = 0;

  alarm_mesh dut (.clk(clk), .rst(rst), .alarm_n_in(alarm_n_in), .global_alarm_n(global_alarm_n));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  // Apply a pattern, wait one rising edge, compare.
  task automatic apply(input logic [N-1:0] v, input string what);
    logic exp;
    exp = ALARM_OK;
    for (int i = 0; i < N; i++) if (v[i] == ALARM_RAISED) exp = ALARM_RAISED;
    @(negedge clk) alarm_n_in = v;
    @(posedge clk); #1;
    check(global_alarm_n, exp, what);
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alarm_n_in = '0;
    #1 rst = 1'b1;
    #1 check(global_alarm_n, ALARM_OK, "reset value");
    @(negedge clk) rst = 1'b0;

    apply('1, "all quiet");
    for (int i = 0; i < N; i++) begin
      logic [N-1:0] v;
      v = '1;
      v[i] = ALARM_RAISED;
      apply(v, $sformatf("detector %0d alarm", i));
      apply('1, "quiet again");
    end
    apply('0, "all raised");
    for (int k = 0; k < 200; k++) begin
      logic [N-1:0] v;
      v = {$urandom, $urandom};
      // mostly quiet patterns with sparse alarms
      if (k % 2 == 0) v = v | {$urandom, $urandom} | {$urandom, $urandom};
      apply(v, "random");
    end

    // one-cycle alarm in, one-cycle alarm out
    apply('1, "quiet");
    @(negedge clk) alarm_n_in[N-1] = ALARM_RAISED;
    @(negedge clk) alarm_n_in[N-1] = ALARM_OK;
    check(global_alarm_n, ALARM_RAISED, "pulse seen");
    @(negedge clk);
    check(global_alarm_n, ALARM_OK, "pulse is one cycle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
