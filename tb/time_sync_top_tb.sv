`timescale 1ps/1fs
// time_sync_top_tb: end-to-end run of the skew-locking design at its default
// parameters (613-tap TDC, M = 4, 64-code averaging, 2 slaves).
//
// Three transceiver clock models share one start: the master (no jitter,
// divider released at 0 UI) and two slaves. Slave 0 releases at a random
// multiple of 400 ps and has +-20 ps of edge jitter. Slave 1 is released 5 ps
// ahead of the master with +-4 ps of jitter, so its rising edge first sits
// inside the TDC's first bin, where no valid code is produced.
//
// Checks, from the models' true phases only:
//   - every step the controller requests reaches the right slave exactly
//     once, through the clock crossing, with the right weight and direction
//     (the model's accumulated phase equals the sum of requested steps),
//   - both slaves lock, and the true skew (master edge minus slave edge)
//     then lies within 8 ps of (target + 0.5) bins of 10.44 ps (a TDC code
//     c means an edge between c and c+1 bins back),
//   - over 60 further measurements the skew stays there and the locked flag
//     is set at least half the time; the RMS of the true skew over them is
//     printed and must stay under 5 ps,
//   - each mechanism happened: out-of-range step, coarse (W = 15) and fine
//     steps, advancing and delaying steps, lock, channel change.
module time_sync_top_tb;
  import tsync_pkg::*;

  localparam real PERIOD = 6400.0;
  localparam real TAU    = 10.44;
  localparam real STEP   = 3.125;

  logic                 start = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 enable = 1'b0;
  logic                 master_pclk;
  logic [1:0]           slave_pclk;
  logic [1:0][17:0]     target_q8;
  logic [1:0]           slave_pi_en;
  pi_step_t [1:0]       slave_pi_stepsize;
  logic [1:0]           locked;
  logic                 meas_strobe;
  logic                 meas_ch;
  logic [17:0]          meas_q8;
  logic                 meas_inrange;
  logic [3:0]           rel [2];
  real                  phase [3];
  int                   seen [3];

  int checks = 0;
  int failures = 0;
  int n_outrange = 0, n_coarse = 0, n_fine = 0, n_adv = 0, n_del = 0, n_lock = 0, n_switch = 0;
  real requested [2] = '{0.0, 0.0};
  int  n_req [2] = '{0, 0};

  time_sync_top dut (
    .master_pclk(master_pclk), .rst_n(rst_n), .enable(enable),
    .slave_pclk(slave_pclk), .target_q8(target_q8),
    .slave_pi_en(slave_pi_en), .slave_pi_stepsize(slave_pi_stepsize),
    .locked(locked), .meas_strobe(meas_strobe), .meas_ch(meas_ch),
    .meas_q8(meas_q8), .meas_inrange(meas_inrange)
  );

  gth_tx_clock_model #(.JITTER_PS(0.0)) u_master (
    .start(start), .release_ui(4'd0), .pi_en(1'b0), .pi_stepsize('0),
    .pclk(master_pclk), .phase_ps(phase[2]), .steps_seen(seen[2])
  );
  gth_tx_clock_model #(.JITTER_PS(20.0)) u_slave0 (
    .start(start), .release_ui(rel[0]), .pi_en(slave_pi_en[0]),
    .pi_stepsize(slave_pi_stepsize[0]), .pclk(slave_pclk[0]),
    .phase_ps(phase[0]), .steps_seen(seen[0])
  );
  gth_tx_clock_model #(.JITTER_PS(4.0), .EXTRA_PS(-5.0)) u_slave1 (
    .start(start), .release_ui(rel[1]), .pi_en(slave_pi_en[1]),
    .pi_stepsize(slave_pi_stepsize[1]), .pclk(slave_pclk[1]),
    .phase_ps(phase[1]), .steps_seen(seen[1])
  );

  // True skew of slave i: how long before a master edge its last rising edge
  // was, in 0..PERIOD.
  function automatic real skew(input int i);
    real d = phase[2] - phase[i];
    while (d < 0.0) d += PERIOD;
    while (d >= PERIOD) d -= PERIOD;
    return d;
  endfunction

  initial begin
    #(64'd6400 * 400000);
    failures++;
    $display("watchdog: locked=%b", locked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count what the controller asks for, on the master clock.
  always @(posedge master_pclk) begin
    if (rst_n && dut.step_req) begin
      automatic int i = int'(dut.step_ch);
      n_req[i]++;
      requested[i] += (dut.step.delay ? 1.0 : -1.0) * dut.step.w * STEP;
      if (dut.step.w == 4'd15) n_coarse++; else n_fine++;
      if (dut.step.delay) n_del++; else n_adv++;
    end
    if (rst_n && meas_strobe) begin
      if (!meas_inrange) n_outrange++;
      if (meas_inrange && !dut.step_req) n_lock++;
      if (dut.u_ctrl.state == ST_SELECT) n_switch++;
    end
  end

  task automatic check_delivery(input string when);
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (seen[i] != n_req[i]) begin
        failures++;
        $display("FAIL %s: slave %0d saw %0d steps, %0d requested", when, i, seen[i], n_req[i]);
      end
      checks++;
      if (phase[i] - (rel[i] * 400.0 + (i == 1 ? -5.0 : 0.0)) - requested[i] > 0.001 ||
          phase[i] - (rel[i] * 400.0 + (i == 1 ? -5.0 : 0.0)) - requested[i] < -0.001) begin
        failures++;
        $display("FAIL %s: slave %0d phase %f, requested %f", when, i, phase[i], requested[i]);
      end
    end
  endtask

  initial begin
    automatic real tgt [2] = '{300.0, 150.5};
    automatic real sum [2] = '{0.0, 0.0};
    automatic real sum2 [2] = '{0.0, 0.0};
    automatic int cnt [2] = '{0, 0};
    automatic int held [2] = '{0, 0};
    rel[0] = 4'($urandom_range(15, 1));
    rel[1] = 4'd0;
    target_q8[0] = 18'(int'(tgt[0] * 256.0));
    target_q8[1] = 18'(int'(tgt[1] * 256.0));
    #1000 start = 1'b1;
    repeat (4) @(posedge master_pclk);
    #1 rst_n = 1'b1;
    enable = 1'b1;
    $display("slave 0 released at %0d UI: initial skew %f ps", rel[0], skew(0));
    $display("slave 1 initial skew %f ps", skew(1));
    wait (locked == 2'b11);
    repeat (3) @(posedge master_pclk);
    for (int i = 0; i < 2; i++)
      $display("locked: slave %0d skew %f ps, aim %f ps", i, skew(i), (tgt[i] + 0.5) * TAU);
    // Watch the lock over further measurements.
    repeat (60) begin
      @(posedge meas_strobe);
      #1;
      for (int i = 0; i < 2; i++) begin
        automatic real e = skew(i) - (tgt[i] + 0.5) * TAU;
        sum[i] += e;
        sum2[i] += e * e;
        cnt[i]++;
        if (locked[i]) held[i]++;
        checks++;
        if (e > 8.0 || e < -8.0) begin
          failures++;
          $display("FAIL slave %0d skew %f ps off its aim", i, e);
        end
      end
    end
    repeat (20) @(posedge master_pclk);
    check_delivery("after lock");
    for (int i = 0; i < 2; i++) begin
      automatic real mean = sum[i] / cnt[i];
      automatic real rms  = $sqrt(sum2[i] / cnt[i] - mean * mean);
      $display("slave %0d: skew offset mean %f ps, RMS %f ps over %0d measurements",
               i, mean, rms, cnt[i]);
      checks++;
      if (rms > 5.0) begin failures++; $display("FAIL slave %0d RMS too large", i); end
    end
    // Jitter can push one average just past the deadband, which clears the
    // flag until the next correction; it must be set most of the time.
    for (int i = 0; i < 2; i++) begin
      $display("slave %0d locked at %0d of %0d measurements", i, held[i], cnt[i]);
      checks++;
      if (held[i] * 2 < cnt[i]) begin failures++; $display("FAIL slave %0d seldom locked", i); end
    end
    $display("mechanisms: out_of_range=%0d coarse=%0d fine=%0d advance=%0d delay=%0d lock=%0d switch=%0d",
             n_outrange, n_coarse, n_fine, n_adv, n_del, n_lock, n_switch);
    checks++;
    if (n_outrange == 0 || n_coarse == 0 || n_fine == 0 || n_adv == 0 || n_del == 0 ||
        n_lock == 0 || n_switch == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
