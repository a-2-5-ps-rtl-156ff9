`timescale 1ps/1fs
// relock_precision_tb: repeated power-up test of the skew lock, at the
// design's default parameters. For each of six skew targets between 750 ps
// and 5650 ps, the three transceiver clock models are powered up six times,
// each time with the slaves' dividers released at new random multiples of
// 400 ps and +-20 ps of edge jitter on both slaves. After each power-up the
// design is reset and enabled; once both slaves are locked and three more
// measurements have passed, the true skew of each slave is recorded.
//
// For every target it prints the mean offset from the aimed skew, the RMS
// spread and the span over the 12 lock results, and checks that each result
// lies within 10 ps of the aim and that the RMS spread is below 5 ps.
module relock_precision_tb;
  import tsync_pkg::*;

  localparam real PERIOD = 6400.0;
  localparam real TAU    = 10.44;
  localparam int  N_PT   = 6;
  localparam int  N_PWR  = 6;

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

  time_sync_top dut (
    .master_pclk(master_pclk), .rst_n(rst_n), .enable(enable),
    .slave_pclk(slave_pclk), .target_q8(target_q8),
    .slave_pi_en(slave_pi_en), .slave_pi_stepsize(slave_pi_stepsize),
    .locked(locked), .meas_strobe(meas_strobe), .meas_ch(meas_ch),
    .meas_q8(meas_q8), .meas_inrange(meas_inrange)
  );

  gth_tx_clock_model u_master (
    .start(start), .release_ui(4'd0), .pi_en(1'b0), .pi_stepsize('0),
    .pclk(master_pclk), .phase_ps(phase[2]), .steps_seen(seen[2])
  );
  gth_tx_clock_model #(.JITTER_PS(20.0)) u_slave0 (
    .start(start), .release_ui(rel[0]), .pi_en(slave_pi_en[0]),
    .pi_stepsize(slave_pi_stepsize[0]), .pclk(slave_pclk[0]),
    .phase_ps(phase[0]), .steps_seen(seen[0])
  );
  gth_tx_clock_model #(.JITTER_PS(20.0)) u_slave1 (
    .start(start), .release_ui(rel[1]), .pi_en(slave_pi_en[1]),
    .pi_stepsize(slave_pi_stepsize[1]), .pclk(slave_pclk[1]),
    .phase_ps(phase[1]), .steps_seen(seen[1])
  );

  function automatic real skew(input int i);
    real d = phase[2] - phase[i];
    while (d < 0.0) d += PERIOD;
    while (d >= PERIOD) d -= PERIOD;
    return d;
  endfunction

  initial begin
    #(64'd6400 * 3000000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic real points [N_PT] = '{750.0, 1700.0, 2700.0, 3700.0, 4700.0, 5650.0};
    for (int p = 0; p < N_PT; p++) begin
      automatic real tgt_bins = points[p] / TAU - 0.5;
      automatic real aim = (real'(int'(tgt_bins * 256.0)) / 256.0 + 0.5) * TAU;
      automatic real sum = 0.0, sum2 = 0.0, lo = 1.0e9, hi = -1.0e9;
      automatic int  n = 0;
      target_q8[0] = 18'(int'(tgt_bins * 256.0));
      target_q8[1] = 18'(int'(tgt_bins * 256.0));
      for (int k = 0; k < N_PWR; k++) begin
        // Power down, then up with new random divider release points.
        enable = 1'b0;
        rst_n  = 1'b0;
        start  = 1'b0;
        #20000;
        rel[0] = 4'($urandom_range(15));
        rel[1] = 4'($urandom_range(15));
        start  = 1'b1;
        repeat (4) @(posedge master_pclk);
        #1 rst_n = 1'b1;
        enable = 1'b1;
        wait (locked == 2'b11);
        repeat (3) @(posedge meas_strobe);
        #1;
        for (int i = 0; i < 2; i++) begin
          automatic real e = skew(i) - aim;
          sum += e;
          sum2 += e * e;
          if (e < lo) lo = e;
          if (e > hi) hi = e;
          n++;
          checks++;
          if (e > 10.0 || e < -10.0) begin
            failures++;
            $display("FAIL target %f ps, power-up %0d: slave %0d off by %f ps", aim, k, i, e);
          end
        end
      end
      begin
        automatic real mean = sum / n;
        automatic real rms  = $sqrt(sum2 / n - mean * mean);
        $display("target %7.1f ps: mean offset %6.2f ps, RMS %5.2f ps, span %5.2f ps over %0d locks",
                 aim, mean, rms, hi - lo, n);
        checks++;
        if (rms > 5.0) begin failures++; $display("FAIL RMS above 5 ps"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
