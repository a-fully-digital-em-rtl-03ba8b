// tb_rst_release_sync: self-checking testbench for rst_release_sync.
//
// Asserts rst_in at random times and releases it at random times, both while
// the clock is high and while it is low. Checks that rst_out rises at once
// with rst_in, that it falls only on a falling clock edge, and exactly at the
// second falling edge after rst_in fell.
`timescale 1ns/1ps
module tb_rst_release_sync;
  logic clk = 1'b0;
  logic rst_in = 1'b0;
  logic rst_out;
  int   checks = 0, failures = 0;
  int   falls_since_release;

  rst_release_sync dut (.clk(clk), .rst_in(rst_in), .rst_out(rst_out));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  always @(negedge clk) if (!rst_in) falls_since_release++;

  // rst_out may only fall on a falling clock edge.
  always @(negedge rst_out) check(clk, 1'b0, "release while clock low");

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 60; k++) begin
      #($urandom_range(1, 9));
      rst_in = 1'b1;
      #0.1 check(rst_out, 1'b1, "assert at once");
      #($urandom_range(1, 30));
      rst_in = 1'b0;
      falls_since_release = 0;
      while (rst_out) #1;
      check(falls_since_release == 2, 1'b1, "release at second falling edge");
      check(clk, 1'b0, "clock low after release");
      #($urandom_range(10, 40));
      check(rst_out, 1'b0, "stays released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
