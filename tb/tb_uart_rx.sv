// tb_uart_rx: self-checking testbench for uart_rx at its default bit time
// (868 clock cycles, 115200 baud at 100 MHz).
//
// Sends random bytes as 8N1 frames with random idle gaps, plus a frame with a
// bad stop bit (must be dropped with frame_err) and a short low glitch on the
// idle line (must be ignored). Each received byte is compared with the byte
// sent, and the time from the start of the start bit to the valid strobe is
// checked against 9.5 bit times plus the synchroniser delay.
`timescale 1ns/1ps
module tb_uart_rx;
  localparam int unsigned CPB = 868;

  logic       clk = 1'b0;
  logic       rst = 1'b0;
  logic       rxd = 1'b1;
  logic       valid, frame_err;
  logic [7:0] data;
  int         checks = 0, failures = 0;
  int         n_valid = 0, n_ferr = 0;
  logic [7:0] exp_q[$];
  longint     t_start, t_valid;

  uart_rx dut (.clk(clk), .rst(rst), .rxd(rxd), .valid(valid), .data(data), .frame_err(frame_err));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  task automatic send_frame(input logic [7:0] b, input logic stop);
    @(negedge clk);
    t_start = $time;
    rxd = 1'b0;
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i];
      repeat (CPB) @(negedge clk);
    end
    rxd = stop;
    repeat (CPB) @(negedge clk);
    rxd = 1'b1;
  endtask

  always @(posedge clk) begin
    if (valid) begin
      n_valid++;
      t_valid = $time;
      if (exp_q.size() == 0) check(1'b0, 1'b1, "unexpected byte");
      else check(data == exp_q.pop_front(), 1'b1, "received byte");
      // start bit begins at t_start; valid 9.5 bit times later plus 2-3 cycles
      check((t_valid - t_start) / 10 >= 64'(CPB * 19 / 2) &&
            (t_valid - t_start) / 10 <= 64'(CPB * 19 / 2 + 4), 1'b1, "valid latency");
    end
    if (frame_err) n_ferr++;
  end

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    #1 rst = 1'b1;
    #20 rst = 1'b0;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 24; k++) begin
      b = (k == 0) ? 8'h00 : (k == 1) ? 8'hFF : 8'($urandom);
      exp_q.push_back(b);
      send_frame(b, 1'b1);
      repeat ($urandom_range(0, 2 * CPB)) @(negedge clk);
    end
    // a glitch shorter than half a bit must not start a frame
    @(negedge clk) rxd = 1'b0;
    repeat (CPB / 4) @(negedge clk);
    rxd = 1'b1;
    repeat (3 * CPB) @(negedge clk);
    // a frame with its stop bit at 0 is dropped
    send_frame(8'h3C, 1'b0);
    repeat (2 * CPB) @(negedge clk);
    // and the receiver still works afterwards
    exp_q.push_back(8'hA7);
    send_frame(8'hA7, 1'b1);
    repeat (2 * CPB) @(negedge clk);

    check(n_valid == 25, 1'b1, "number of bytes received");
    check(n_ferr == 1, 1'b1, "one framing error");
    check(exp_q.size() == 0, 1'b1, "all bytes received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
