// half_detector: one half of the fully digital EM pulse detector.
//
// Two sensing flip-flops (hd_sense_pair) toggle on opposite clock edges, so
// that at least one of them is switching for as much of each clock period as
// possible; a flip-flop is most sensitive to an EM pulse while it switches.
// DFF3 samples q1 xor q2 on the rising edge. In normal operation the two are
// always in opposite phase at that edge and DFF3 holds 1. A pulse that upsets
// either sensing flip-flop puts them in phase and DFF3 drops to 0 at the next
// rising edge, and stays there until reset. A pulse that upsets DFF3 itself
// shows as a 0 lasting one clock cycle.
//
// Interface: clk, rst (asynchronous, active high; it must be released while
// clk is low, so that the first edge after reset is a rising one, see
// rst_release_sync), alarm_n (active low), and
// q1/q2 for observation. Latency: a disturbance of the pair shows on alarm_n
// at the first rising edge after it.
//
// ALARM_FF = 1 (default) builds the stand-alone half detector with DFF3. Inside
// the full detector the two half detectors share one alarm flip-flop, so there
// ALARM_FF = 0 leaves DFF3 out and alarm_n is the XOR itself (1 while the pair
// is in opposite phase), sampled by the full detector.
//
// Follows the paper: the three flip-flops, the XOR, the edges, the initial
// values (INIT_Q1 = 1 for the first half detector, 0 for the second) and
// DFF3's initial value of 1. This design's choice: DFF3 is also loaded with 1
// by rst, the way an FPGA's global set/reset restores the INIT value.
module half_detector
  import emp_pkg::*;
#(
  parameter bit INIT_Q1  = 1'b1,
  parameter bit ALARM_FF = 1'b1
) (
  input  logic clk,
  input  logic rst,
  output logic alarm_n,
  output logic q1,
  output logic q2
);

  hd_sense_pair #(.INIT_Q1(INIT_Q1)) u_pair (
    .clk (clk),
    .rst (rst),
    .q1  (q1),
    .q2  (q2)
  );

  logic pair_ok;

  assign pair_ok = q1 ^ q2;

  if (ALARM_FF) begin : g_dff3
    // DFF3: alarm flip-flop, Init 1.
    always_ff @(posedge clk or posedge rst) begin
      if (rst) alarm_n <= ALARM_OK;
      else     alarm_n <= pair_ok;
    end
  end else begin : g_no_dff3
    assign alarm_n = pair_ok;
  end

endmodule
