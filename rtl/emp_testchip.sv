// emp_testchip: EM pulse detector test chip, the detectors and their control.
//
// N_DET full EM pulse detectors (37 by default, spread over the die in the
// physical design) all run from the system clock. Their active-low alarms are
// merged by alarm_mesh into one global alarm. test_controller receives a key,
// a plaintext and a start command over a byte link, re-arms the detectors,
// raises the trigger pin that fires the external pulse generator, runs the
// AES core, and returns the ciphertext followed by a status byte that says
// whether the global alarm fell during the run.
//
// The host link is an RS232 receiver/transmitter pair (uart_rx, uart_tx,
// 8N1, CLKS_PER_BIT clock cycles per bit: 115200 baud at 100 MHz). The AES
// core is outside this module: its signals are ports (aes_*), so that any
// FIPS-197 AES-128 core can be attached. rst is asynchronous and active high and
// resets everything; the detectors are also reset by the controller's re-arm
// pulse. Either reset reaches the detectors through rst_release_sync, which
// releases it on a falling clock edge so that no detector raises a false alarm
// when it starts. global_alarm_n shows the live global alarm on a pin, alarm_latched the
// controller's record of it for the current run (the bit the status byte
// reports).
//
// Follows the paper: 37 detectors, one global alarm from all of them, the
// key/plaintext/command sequence, the trigger before ciphering, and the
// ciphertext and alarm state returned. This design's own choices are listed in
// alarm_mesh and test_controller.
module emp_testchip
  import emp_pkg::*;
#(
  parameter int unsigned N_DET        = 37,
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic                clk,
  input  logic                rst,
  // RS232 link
  input  logic                uart_rxd,
  output logic                uart_txd,
  output logic                rx_frame_err,
  // AES core side
  output logic [AES_BITS-1:0] aes_key,
  output logic [AES_BITS-1:0] aes_pt,
  output logic                aes_start,
  input  logic                aes_done,
  input  logic [AES_BITS-1:0] aes_ct,
  // experiment pins
  output logic                trigger,
  output logic                global_alarm_n,
  output logic                alarm_latched
);

  logic             rx_valid;
  logic [7:0]       rx_data;
  logic             tx_valid;
  logic [7:0]       tx_data;
  logic             tx_ready;
  logic             det_rearm;
  logic             det_rst_req;
  logic             det_rst;
  logic [N_DET-1:0] det_alarm_n;

  assign det_rst_req = rst | det_rearm;

  // Release the detector reset on a falling edge only.
  rst_release_sync u_det_rst (
    .clk     (clk),
    .rst_in  (det_rst_req),
    .rst_out (det_rst)
  );

  // The detectors are identical logic on identical inputs: the attributes ask
  // synthesis to keep each one as its own instance rather than merge them.
  for (genvar i = 0; i < N_DET; i++) begin : g_det
    (* keep_hierarchy = "yes", dont_touch = "true" *)
    full_detector u_det (
      .clk     (clk),
      .rst     (det_rst),
      .alarm_n (det_alarm_n[i])
    );
  end

  alarm_mesh #(.N_DET(N_DET)) u_mesh (
    .clk            (clk),
    .rst            (det_rst),
    .alarm_n_in     (det_alarm_n),
    .global_alarm_n (global_alarm_n)
  );

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk       (clk),
    .rst       (rst),
    .rxd       (uart_rxd),
    .valid     (rx_valid),
    .data      (rx_data),
    .frame_err (rx_frame_err)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk   (clk),
    .rst   (rst),
    .valid (tx_valid),
    .ready (tx_ready),
    .data  (tx_data),
    .txd   (uart_txd)
  );

  test_controller u_ctrl (
    .clk            (clk),
    .rst            (rst),
    .rx_valid       (rx_valid),
    .rx_data        (rx_data),
    .tx_valid       (tx_valid),
    .tx_data        (tx_data),
    .tx_ready       (tx_ready),
    .aes_key        (aes_key),
    .aes_pt         (aes_pt),
    .aes_start      (aes_start),
    .aes_done       (aes_done),
    .aes_ct         (aes_ct),
    .trigger        (trigger),
    .det_rst        (det_rearm),
    .global_alarm_n (global_alarm_n),
    .alarm_seen     (alarm_latched)
  );

endmodule
