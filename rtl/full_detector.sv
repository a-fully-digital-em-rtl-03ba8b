// full_detector: the complete fully digital EM pulse detector.
//
// Two half detectors (half_detector with ALARM_FF = 0, i.e. their two sensing
// flip-flops and their XOR) are initialised in opposite phase (HD1:
// Q1=1/Q2=0, HD2: Q1=0/Q2=1). Between them the four flip-flops see all four
// kinds of switching at every clock period: rising clock edge with Q rising and
// with Q falling, falling clock edge with Q rising and with Q falling. Each
// pair is XORed, the two results are ANDed, and one alarm flip-flop (Init 1)
// samples the AND on the rising clock edge. So the detector has five
// flip-flops, six inverters (two feedback and one clock inverter per pair), two
// XORs and one AND2, as the paper counts them.
//
// Interface: clk, rst (asynchronous, active high; it must be released while
// clk is low, so that the first edge after reset is a rising one, see
// rst_release_sync), alarm_n (active low). An
// upset of any sensing flip-flop drives alarm_n low from the next rising edge
// until reset; an upset of the alarm flip-flop itself gives a one-cycle 0.
//
// The four sensing outputs hd*_q* are kept as named nets only so that they can
// be observed in simulation; nothing reads them inside this module.
//
// Follows the paper: the structure and initial values. This design's
// choice: the reset polarity and that rst also reloads the alarm flip-flop.
module full_detector
  import emp_pkg::*;
(
  input  logic clk,
  input  logic rst,
  output logic alarm_n
);

  logic hd1_q1, hd1_q2, hd2_q1, hd2_q2;
  logic hd1_ok, hd2_ok;
  logic ok;

  half_detector #(.INIT_Q1(1'b1), .ALARM_FF(1'b0)) u_hd1 (
    .clk (clk), .rst (rst), .alarm_n (hd1_ok), .q1 (hd1_q1), .q2 (hd1_q2)
  );

  half_detector #(.INIT_Q1(1'b0), .ALARM_FF(1'b0)) u_hd2 (
    .clk (clk), .rst (rst), .alarm_n (hd2_ok), .q1 (hd2_q1), .q2 (hd2_q2)
  );

  assign ok = hd1_ok & hd2_ok;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) alarm_n <= ALARM_OK;
    else     alarm_n <= ok;
  end

endmodule
