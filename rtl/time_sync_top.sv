`timescale 1ps/1fs
// time_sync_top: multichannel time synchronisation of FPGA high-speed
// transceivers. One transceiver is the master: its parallel clock is the
// system clock of this logic and the reference clock of the TDC. Every other
// transceiver is a slave whose parallel clock comes back through a
// multiplexer as the TDC's hit signal. The TDC measures where the selected
// slave's clock edge lies against the master's, and pi_control nudges that
// slave's phase interpolator until the skew sits on the target given for it.
// Because each transceiver's clock dividers start at a random moment after
// power-up, the skew between channels is otherwise a random multiple of the
// 400 ps UI; the loop removes it, or sets it to any chosen value.
//
// Ports: master_pclk (master parallel clock, 6.4 ns), rst_n (synchronous to
// master_pclk), enable, slave_pclk per slave, target_q8 per slave (skew
// target in TDC bins, 8 fraction bits; one bin is about 10.4 ps). Outputs to
// each slave transceiver, in that slave's own clock domain: slave_pi_en, a
// one-cycle strobe, and slave_pi_stepsize = {direction, W_pi[3:0]}. Status:
// locked per slave and the measurement report of pi_control.
//
// From the document: master clock as system clock and TDC reference, all
// slave outputs through one mux into a carry-chain TDC, TDC result steering
// the PIs. This design's own: the per-slave clock-domain crossing of the
// step commands and the controller's algorithm (see pi_control).
module time_sync_top
  import tsync_pkg::*;
#(
  parameter int unsigned N_SLAVES      = 2,
  parameter int unsigned TAPS          = 613,
  parameter int unsigned M             = 4,
  parameter real         CO_DELAY_PS   = 5.22,
  parameter int unsigned AVG_LOG2      = 6,
  parameter int unsigned SETTLE_CYCLES = 16,
  parameter int unsigned GAIN_Q4       = 53,
  parameter int unsigned DEADBAND_Q8   = 38,
  parameter int unsigned VISIT_STEPS   = 256,
  parameter int unsigned CODE_W        = $clog2(TAPS + 1),
  parameter int unsigned SEL_W         = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1
) (
  input  logic                                      master_pclk,
  input  logic                                      rst_n,
  input  logic                                      enable,
  input  logic [N_SLAVES-1:0]                       slave_pclk,
  input  logic [N_SLAVES-1:0][CODE_W+CODE_FRAC-1:0] target_q8,
  output logic [N_SLAVES-1:0]                       slave_pi_en,
  output pi_step_t [N_SLAVES-1:0]                   slave_pi_stepsize,
  output logic [N_SLAVES-1:0]                       locked,
  output logic                                      meas_strobe,
  output logic [SEL_W-1:0]                          meas_ch,
  output logic [CODE_W+CODE_FRAC-1:0]               meas_q8,
  output logic                                      meas_inrange
);

  logic              hit;
  logic [SEL_W-1:0]  sel;
  logic [CODE_W-1:0] code;
  logic              code_valid;
  logic              step_req;
  logic [SEL_W-1:0]  step_ch;
  pi_step_t          step;

  hit_mux #(
    .N_SLAVES (N_SLAVES),
    .SEL_W    (SEL_W)
  ) u_mux (
    .slave_clk (slave_pclk),
    .sel       (sel),
    .hit       (hit)
  );

  tdc #(
    .TAPS        (TAPS),
    .M           (M),
    .CO_DELAY_PS (CO_DELAY_PS),
    .CODE_W      (CODE_W)
  ) u_tdc (
    .ref_clk (master_pclk),
    .rst_n   (rst_n),
    .hit     (hit),
    .code    (code),
    .valid   (code_valid)
  );

  pi_control #(
    .N_SLAVES      (N_SLAVES),
    .SEL_W         (SEL_W),
    .CODE_W        (CODE_W),
    .AVG_LOG2      (AVG_LOG2),
    .SETTLE_CYCLES (SETTLE_CYCLES),
    .GAIN_Q4       (GAIN_Q4),
    .DEADBAND_Q8   (DEADBAND_Q8),
    .VISIT_STEPS   (VISIT_STEPS)
  ) u_ctrl (
    .clk          (master_pclk),
    .rst_n        (rst_n),
    .enable       (enable),
    .target       (target_q8),
    .code         (code),
    .code_valid   (code_valid),
    .sel          (sel),
    .step_req     (step_req),
    .step_ch      (step_ch),
    .step         (step),
    .locked       (locked),
    .meas_strobe  (meas_strobe),
    .meas_ch      (meas_ch),
    .meas_q8      (meas_q8),
    .meas_inrange (meas_inrange)
  );

  for (genvar i = 0; i < N_SLAVES; i++) begin : g_slave
    pi_step_sync u_sync (
      .clk_m       (master_pclk),
      .rst_n       (rst_n),
      .req         (step_req && step_ch == SEL_W'(i)),
      .step        (step),
      .clk_s       (slave_pclk[i]),
      .pi_en       (slave_pi_en[i]),
      .pi_stepsize (slave_pi_stepsize[i])
    );
  end

endmodule
