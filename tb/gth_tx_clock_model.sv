`timescale 1ps/1fs
// gth_tx_clock_model: behavioural model, for simulation only, of the TX
// clocking of one FPGA high-speed transceiver as seen by the skew-locking
// logic: reference clock -> PLL -> phase interpolator -> serial and parallel
// clock dividers -> parallel clock out.
//
// The parallel clock has period PERIOD_PS (6.4 ns: 16 bits at 2.5 Gb/s). Its
// dividers start at a random moment after power-up, modelled as a release
// delay of release_ui * UI_PS after the rising edge of start; the clock stops
// when start falls and a new rising edge of start is a new power-up. Each rising
// edge carries a uniform random jitter of +-JITTER_PS. When pi_en is high on
// a rising edge of pclk, the phase interpolator moves every later edge by
// W_pi * UI_PS / (64 * D_TXOUT) (3.125 ps per unit with the defaults), later
// if pi_stepsize.delay is set and earlier otherwise.
//
// phase_ps is the clock's total offset (release plus all PI steps), which a
// testbench compares with what the TDC measures.
module gth_tx_clock_model
  import tsync_pkg::*;
#(
  parameter real         PERIOD_PS  = 6400.0,
  parameter real         UI_PS      = 400.0,
  parameter int unsigned D_TXOUT    = 2,
  parameter real         JITTER_PS  = 0.0,
  parameter real         EXTRA_PS   = 0.0
) (
  input  logic       start,
  input  logic [3:0] release_ui,
  input  logic       pi_en,
  input  pi_step_t   pi_stepsize,
  output logic       pclk,
  output real        phase_ps,
  output int         steps_seen
);

  localparam real STEP_PS = UI_PS / (64.0 * D_TXOUT);

  real nominal;
  real pending;
  real jit;

  initial begin
    pclk       = 1'b0;
    pending    = 0.0;
    phase_ps   = 0.0;
    steps_seen = 0;
    forever begin
      // Power-up: the dividers release release_ui UIs after start rises.
      @(posedge start);
      pending    = 0.0;
      steps_seen = 0;
      phase_ps   = release_ui * UI_PS + EXTRA_PS;
      nominal    = $realtime + PERIOD_PS + phase_ps;
      while (start) begin
        jit = JITTER_PS * (real'($urandom_range(2000)) / 1000.0 - 1.0);
        #(nominal + jit - $realtime);
        pclk = 1'b1;
        #(PERIOD_PS / 2.0);
        pclk = 1'b0;
        nominal  = nominal + PERIOD_PS + pending;
        phase_ps = phase_ps + pending;
        pending  = 0.0;
      end
    end
  end

  always @(posedge pclk) begin
    if (pi_en) begin
      steps_seen = steps_seen + 1;
      if (pi_stepsize.delay) pending = pending + pi_stepsize.w * STEP_PS;
      else                   pending = pending - pi_stepsize.w * STEP_PS;
    end
  end

endmodule
