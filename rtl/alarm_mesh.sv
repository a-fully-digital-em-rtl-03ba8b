// alarm_mesh: merges the alarms of all EM pulse detectors into one global alarm.
//
// Every detector alarm is active low, so the global alarm is the AND of all of
// them: one detector at 0 drives the global alarm to 0. The AND is registered
// once (reset value 1) so that the global alarm is a clean flip-flop output
// however far apart the detectors are placed on the die.
//
// Interface: clk, rst (asynchronous, active high), alarm_n_in[N_DET-1:0],
// global_alarm_n. Latency: one clock cycle from any detector alarm to the
// global alarm; a one-cycle detector alarm gives a one-cycle global alarm.
//
// Follows the paper: N_DET = 37 detectors and a single global alarm built
// from all of them. This design's choice: the AND reduction and the one
// register stage; the paper gives the mesh's function but not its gates.
module alarm_mesh
  import emp_pkg::*;
#(
  parameter int unsigned N_DET = 37
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N_DET-1:0] alarm_n_in,
  output logic             global_alarm_n
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) global_alarm_n <= ALARM_OK;
    else     global_alarm_n <= &alarm_n_in;
  end

endmodule
