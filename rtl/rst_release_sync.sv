// rst_release_sync: asserts a detector reset at once and releases it on a
// falling clock edge.
//
// A half detector only holds its alarm at 1 if the first clock edge after its
// reset is a rising one: its rising-edge flip-flop must switch first, as in the
// normal waveform of the detector. If the reset were released while the clock
// is high, the falling-edge flip-flop would switch first, the pair would be in
// phase at the next rising edge and the detector would raise a false alarm.
// This block therefore releases the reset through two flip-flops clocked on
// the falling edge, so the release always comes while the clock is low, two
// falling edges after rst_in is released (the second stage also settles a
// release that is asynchronous to the clock).
//
// Interface: clk, rst_in (asynchronous, active high), rst_out (active high).
// Timing: rst_out rises with rst_in; it falls at the second falling clock edge
// after rst_in falls.
//
// The paper shows the reset wired straight to the sensing flip-flops and
// does not say how it is released; this block is this design's own addition.
module rst_release_sync (
  input  logic clk,
  input  logic rst_in,
  output logic rst_out
);

  logic stage1;

  always_ff @(negedge clk or posedge rst_in) begin
    if (rst_in) begin
      stage1  <= 1'b1;
      rst_out <= 1'b1;
    end else begin
      stage1  <= 1'b0;
      rst_out <= stage1;
    end
  end

endmodule
