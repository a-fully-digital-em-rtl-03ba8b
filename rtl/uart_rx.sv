// uart_rx: receiver of the test chip's RS232 link.
//
// Asynchronous serial, 8 data bits, least significant bit first, no parity,
// one stop bit (8N1). The rxd pin is first brought into the clock domain by two
// flip-flops. A falling edge on the idle line starts a frame; the receiver
// checks the start bit again half a bit later and then samples each data bit
// and the stop bit in the middle of its bit time, counting CLKS_PER_BIT clock
// cycles per bit. A frame whose stop bit is 0 is dropped and flagged on
// frame_err for one cycle.
//
// Interface: clk, rst (asynchronous, active high), rxd (serial input, idles
// high), valid/data (one-cycle strobe per received byte), frame_err.
// Timing: valid rises about 9.5 bit times after the start of the start bit.
//
// The paper names an RS232 block on the test chip and nothing more; the
// frame format and the bit rate (115200 baud at the 100 MHz system clock) are
// this design's choice.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_err
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_t;

  rx_state_t     state;
  logic [1:0]    sync;
  logic          rxd_s;
  logic [CW-1:0] tick;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;

  assign rxd_s = sync[1];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) sync <= 2'b11;
    else     sync <= {sync[0], rxd};
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state     <= RX_IDLE;
      tick      <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        RX_IDLE: if (!rxd_s) begin
          tick  <= CW'(CLKS_PER_BIT / 2 - 1);
          state <= RX_START;
        end
        RX_START: begin
          if (tick != 0) tick <= tick - 1'b1;
          else if (rxd_s) state <= RX_IDLE;     // glitch, not a start bit
          else begin
            tick    <= CW'(CLKS_PER_BIT - 1);
            bit_idx <= '0;
            state   <= RX_DATA;
          end
        end
        RX_DATA: begin
          if (tick != 0) tick <= tick - 1'b1;
          else begin
            shreg <= {rxd_s, shreg[7:1]};
            tick  <= CW'(CLKS_PER_BIT - 1);
            if (bit_idx == 3'd7) state <= RX_STOP;
            bit_idx <= bit_idx + 1'b1;
          end
        end
        RX_STOP: begin
          if (tick != 0) tick <= tick - 1'b1;
          else begin
            if (rxd_s) begin
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
            state <= RX_IDLE;
          end
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

endmodule
