// tb_uart_tx: self-checking testbench for uart_tx at its default bit time
// (868 clock cycles).
//
// Offers random bytes with random gaps. An independent line decoder waits for
// the falling start-bit edge, samples the line in the middle of each bit and
// checks start bit, data and stop bit. Also checks the frame length (the
// line must stay in each bit for exactly CLKS_PER_BIT cycles, so the next
// start bit of back-to-back bytes comes 10 bit times and one cycle after the
// previous one)
// and that ready is low while a frame is on the line.
`timescale 1ns/1ps
module tb_uart_tx;
  localparam int unsigned CPB = 868;

  logic       clk = 1'b0;
  logic       rst = 1'b0;
  logic       valid = 1'b0;
  logic       ready, txd;
  logic [7:0] data = '0;
  int         checks = 0, failures = 0;
  int         n_rx = 0, n_b2b = 0;
  logic [7:0] exp_q[$];

  uart_tx dut (.clk(clk), .rst(rst), .valid(valid), .ready(ready), .data(data), .txd(txd));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  // line decoder
  initial begin
    longint last_start = -1;
    logic [7:0] b;
    forever begin
      @(negedge txd);
      if (last_start >= 0 && ($time - last_start) / 10 <= 64'(10 * CPB + 3)) n_b2b++;
      check(last_start < 0 || ($time - last_start) / 10 >= 64'(10 * CPB), 1'b1, "frame spacing");
      last_start = $time;
      #(CPB * 10 / 2);
      check(txd, 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        #(CPB * 10);
        b[i] = txd;
      end
      #(CPB * 10);
      check(txd, 1'b1, "stop bit");
      n_rx++;
      if (exp_q.size() == 0) check(1'b0, 1'b1, "unexpected frame");
      else check(b == exp_q.pop_front(), 1'b1, "frame data");
    end
  end

  // ready must stay low for the whole frame
  always @(posedge clk) if (!rst && txd == 1'b0) check(ready, 1'b0, "ready low during start bit");

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    #20 rst = 1'b0;
    check(txd, 1'b1, "idle line high");
    repeat (5) @(posedge clk);
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      valid = 1'b1;
      data  = 8'($urandom);
      exp_q.push_back(data);
      @(posedge clk);
      while (!ready) @(posedge clk);
      @(negedge clk) valid = 1'b0;
      if (k % 3 == 0) repeat ($urandom_range(1, 3 * CPB)) @(negedge clk);
    end
    while (exp_q.size() != 0) @(posedge clk);
    repeat (CPB) @(posedge clk);
    check(n_rx == 20, 1'b1, "frames received");
    check(n_b2b > 0, 1'b1, "back-to-back frames seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
