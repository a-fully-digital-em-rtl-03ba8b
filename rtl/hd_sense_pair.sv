// hd_sense_pair: the two sensing flip-flops of a half detector.
//
// DFF1 toggles on every rising clock edge and DFF2 on every falling edge (its
// clock goes through an inverter), each through an inverter in its own feedback
// loop. Reset loads DFF1 with INIT_Q1 and DFF2 with its complement, so that on
// every rising edge, just before DFF1 switches, q1 and q2 hold opposite values.
// A flip-flop whose switching is disturbed (a missed or extra toggle, or a bit
// set/reset while idle) puts the pair in phase, and it stays in phase until the
// next reset, because both keep toggling afterwards.
//
// Interface: clk, rst (asynchronous, active high, as the R pin of the two
// flip-flops in the schematic), q1, q2. The structure, the edges and the
// initial values (HD1: Q1=1/Q2=0, HD2: Q1=0/Q2=1) follow the paper; that the
// reset is asynchronous and active high is this design's choice.
module hd_sense_pair #(
  parameter bit INIT_Q1 = 1'b1
) (
  input  logic clk,
  input  logic rst,
  output logic q1,
  output logic q2
);

  // DFF1: rising-edge toggle.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) q1 <= INIT_Q1;
    else     q1 <= ~q1;
  end

  // DFF2: clocked by the inverted clock, i.e. toggles on the falling edge.
  always_ff @(negedge clk or posedge rst) begin
    if (rst) q2 <= ~INIT_Q1;
    else     q2 <= ~q2;
  end

endmodule
