// uart_tx: transmitter of the test chip's RS232 link.
//
// Sends 8N1 frames (start bit 0, 8 data bits least significant first, stop
// bit 1), each bit held for CLKS_PER_BIT clock cycles. A byte is taken when
// valid and ready are both high; ready is high only while the transmitter is
// idle, so a new byte is accepted one cycle after the previous stop bit ends.
//
// Interface: clk, rst (asynchronous, active high), valid/ready/data (byte
// handshake), txd (serial output, idles high).
// Timing: one frame takes 10 * CLKS_PER_BIT cycles; the start bit begins the
// cycle after the byte is taken.
//
// The paper names an RS232 block on the test chip and nothing more; the
// frame format and the bit rate (115200 baud at the 100 MHz system clock) are
// this design's choice.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       valid,
  output logic       ready,
  input  logic [7:0] data,
  output logic       txd
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic          busy;
  logic [9:0]    frame;     // stop, data[7:0], start; shifted out LSB first
  logic [3:0]    bits_left;
  logic [CW-1:0] tick;

  assign ready = ~busy;
  assign txd   = busy ? frame[0] : 1'b1;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      busy      <= 1'b0;
      frame     <= '1;
      bits_left <= '0;
      tick      <= '0;
    end else if (!busy) begin
      if (valid) begin
        busy      <= 1'b1;
        frame     <= {1'b1, data, 1'b0};
        bits_left <= 4'd9;
        tick      <= CW'(CLKS_PER_BIT - 1);
      end
    end else if (tick != 0) begin
      tick <= tick - 1'b1;
    end else if (bits_left == 0) begin
      busy <= 1'b0;
    end else begin
      frame     <= {1'b1, frame[9:1]};
      bits_left <= bits_left - 1'b1;
      tick      <= CW'(CLKS_PER_BIT - 1);
    end
  end

endmodule
