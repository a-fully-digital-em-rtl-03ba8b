// tb_scan_position: one scan position of an injection campaign, on the
// full-size test chip (37 detectors, 115200 baud, no parameter overrides).
//
// The measurement protocol fires 44 pulses at each position of the coil, one
// per ciphering run. This testbench plays 44 such runs. In each, a "pulse"
// upsets between zero and three randomly chosen detectors (never the same
// detector twice in a run) at a random cycle while the AES is busy. The kind
// of upset is random: a sensing flip-flop missing a toggle at a rising or a
// falling edge, a sensing flip-flop flipped while the clock is stable, or the
// alarm flip-flop flipped. Per run it checks the returned ciphertext and that
// the status byte reports an alarm exactly when at least one detector was
// upset. At the end it prints how many of the 44 runs were flagged, the number
// a scan map shows for one position.
`timescale 1ns/1ps
module tb_scan_position;
  import emp_pkg::*;

  localparam int unsigned N     = 37;
  localparam int unsigned CPB   = 868;
  localparam int unsigned RUNS  = 44;

  logic                clk = 1'b0;
  logic                rst = 1'b0;
  logic                uart_rxd = 1'b1;
  logic                uart_txd, rx_frame_err;
  logic [AES_BITS-1:0] aes_key, aes_pt, aes_ct;
  logic                aes_start, aes_done;
  logic                trigger, global_alarm_n, alarm_latched;
  int                  checks = 0, failures = 0;
  int                  n_hit_runs = 0, n_flagged = 0, n_kind[5];

  emp_testchip dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  // AES stand-in: answers 20..40 cycles after aes_start.
  initial begin
    aes_done = 1'b0;
    aes_ct   = '0;
    forever begin
      @(posedge clk);
      if (aes_start) begin
        repeat (20 + $urandom_range(0, 20)) @(posedge clk);
        #1 aes_ct = ~aes_key ^ aes_pt;
        aes_done = 1'b1;
        @(posedge clk); #1 aes_done = 1'b0;
      end
    end
  end

  // One upset process per detector, each with its own constant path.
  logic [N-1:0] hit_req = '0;
  int           hit_kind[N];
  for (genvar i = 0; i < N; i++) begin : g_hit
    logic fv;
    always @(posedge hit_req[i]) begin
      case (hit_kind[i])
        0: begin   // HD1 Q1 misses a rising-edge toggle
          @(negedge clk); #2 fv = dut.g_det[i].u_det.hd1_q1;
          force dut.g_det[i].u_det.u_hd1.u_pair.q1 = fv;
          @(posedge clk); #2 release dut.g_det[i].u_det.u_hd1.u_pair.q1;
        end
        1: begin   // HD1 Q2 misses a falling-edge toggle
          @(posedge clk); #2 fv = dut.g_det[i].u_det.hd1_q2;
          force dut.g_det[i].u_det.u_hd1.u_pair.q2 = fv;
          @(negedge clk); #2 release dut.g_det[i].u_det.u_hd1.u_pair.q2;
        end
        2: begin   // HD2 Q1 flipped while the clock is low
          @(negedge clk); #2 fv = ~dut.g_det[i].u_det.hd2_q1;
          force dut.g_det[i].u_det.u_hd2.u_pair.q1 = fv;
          #1 release dut.g_det[i].u_det.u_hd2.u_pair.q1;
        end
        3: begin   // HD2 Q2 misses a falling-edge toggle
          @(posedge clk); #2 fv = dut.g_det[i].u_det.hd2_q2;
          force dut.g_det[i].u_det.u_hd2.u_pair.q2 = fv;
          @(negedge clk); #2 release dut.g_det[i].u_det.u_hd2.u_pair.q2;
        end
        default: begin   // alarm flip-flop flipped
          @(negedge clk); #2 fv = ALARM_RAISED;
          force dut.g_det[i].u_det.alarm_n = fv;
          #1 release dut.g_det[i].u_det.alarm_n;
        end
      endcase
      hit_req[i] = 1'b0;
    end
  end

  task automatic send_byte(input logic [7:0] b);
    @(negedge clk) uart_rxd = 1'b0;
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      uart_rxd = b[i];
      repeat (CPB) @(negedge clk);
    end
    uart_rxd = 1'b1;
    repeat (CPB) @(negedge clk);
  endtask

  logic [7:0] reply_q[$];
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      repeat (CPB / 2) @(posedge clk);
      check(uart_txd, 1'b0, "reply start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (CPB) @(posedge clk);
      check(uart_txd, 1'b1, "reply stop bit");
      reply_q.push_back(b);
    end
  end

  task automatic recv_byte(output logic [7:0] b);
    while (reply_q.size() == 0) @(posedge clk);
    b = reply_q.pop_front();
  endtask

  initial begin : watchdog
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    #7 rst = 1'b0;
    repeat (10) @(posedge clk);

    for (int r = 0; r < RUNS; r++) begin
      logic [AES_BITS-1:0] key, pt, exp_ct;
      logic [7:0]          b;
      int                  n_hits;
      logic [N-1:0]        chosen;
      key = {$urandom, $urandom, $urandom, $urandom};
      pt  = {$urandom, $urandom, $urandom, $urandom};
      n_hits = (r % 4 == 0) ? 0 : $urandom_range(1, 3);
      for (int i = 0; i < AES_BYTES; i++) send_byte(key[AES_BITS-1-8*i -: 8]);
      for (int i = 0; i < AES_BYTES; i++) send_byte(pt[AES_BITS-1-8*i -: 8]);
      fork
        send_byte(CMD_START);
        begin
          wait (aes_start);
          repeat ($urandom_range(1, 12)) @(posedge clk);
          chosen = '0;
          for (int h = 0; h < n_hits; h++) begin
            int d;
            do d = $urandom_range(0, N - 1); while (chosen[d]);
            chosen[d] = 1'b1;
            hit_kind[d] = $urandom_range(0, 4);
            n_kind[hit_kind[d]]++;
            hit_req[d] = 1'b1;
          end
        end
      join
      exp_ct = ~key ^ pt;
      for (int i = 0; i < AES_BYTES; i++) begin
        recv_byte(b);
        check(b == exp_ct[AES_BITS-1-8*i -: 8], 1'b1, $sformatf("run %0d: ciphertext byte %0d", r, i));
      end
      recv_byte(b);
      check(b == ((n_hits > 0) ? STATUS_ALARM : STATUS_NO_ALARM), 1'b1,
            $sformatf("run %0d (%0d detectors upset): status byte", r, n_hits));
      if (n_hits > 0) n_hit_runs++;
      if (b == STATUS_ALARM) n_flagged++;
    end

    for (int k = 0; k < 5; k++) check(n_kind[k] > 0, 1'b1, $sformatf("upset kind %0d happened", k));
    check(n_hit_runs > 0 && n_hit_runs < RUNS, 1'b1, "both upset and quiet runs");
    $display("scan position: %0d of %0d runs flagged, %0d runs had an upset detector",
             n_flagged, RUNS, n_hit_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
