`timescale 1ps/1fs
// pi_control: the loop that locks every slave channel's clock to a chosen
// skew from the master channel's clock, using the TDC as the phase detector
// and each slave transceiver's phase interpolator (PI) as the actuator.
//
// The controller visits the slave channels in turn. For one channel it
//   1. points the hit multiplexer at that channel (SELECT),
//   2. waits SETTLE_CYCLES for the multiplexer, the TDC pipeline and any PI
//      step just made to take effect (SETTLE),
//   3. adds up 2**AVG_LOG2 valid TDC codes, so that the mean skew is known
//      to a fraction of a TDC bin (MEASURE),
//   4. compares the mean, as a Q.8 bin count, with the channel's target
//      (DECIDE). Within +-DEADBAND_Q8 the channel is locked and the next
//      channel is visited. Otherwise one PI step is issued whose weight
//      W_pi is the error times GAIN_Q4/16 (PI units per bin), rounded and
//      held to 1..15, in the direction that shrinks the error, and the
//      controller goes back to SETTLE on the same channel.
// If too few valid codes arrive (the slave's rising edge is outside the
// delay line, i.e. within a bin of the master's edge), a full-weight step
// that delays the slave is issued to bring the edge into the line. After
// VISIT_STEPS steps without lock the next channel gets its turn anyway.
//
// A TDC code counts bins from the slave's rising edge back from the master's
// edge, so a later slave clock gives a smaller code: a mean above the target
// asks for a step with delay = 1.
//
// Interface (all in clk, the master parallel clock): enable, per-channel
// targets in Q.8 bins, code/code_valid from the TDC; sel to the multiplexer;
// step_req (one-cycle pulse) with step_ch and step; locked per channel; and a
// measurement report (meas_strobe with meas_ch, meas_q8, meas_inrange) at
// every DECIDE. rst_n is synchronous.
//
// From the document: the TDC measures the skew of the multiplexed slave
// clock against the master clock and drives the slaves' PIs; skews can be
// locked to arbitrary targets; W_pi is 1..15 with 3.125 ps per unit. This
// design's choices: the visit order, averaging, the proportional step rule
// and its gain (10.44 ps per bin / 3.125 ps per PI unit = 53/16), the
// deadband (half a PI unit), and all cycle counts.
module pi_control
  import tsync_pkg::*;
#(
  parameter int unsigned N_SLAVES      = 2,
  parameter int unsigned SEL_W         = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1,
  parameter int unsigned CODE_W        = 10,
  parameter int unsigned AVG_LOG2      = 6,
  parameter int unsigned SETTLE_CYCLES = 16,
  parameter int unsigned GAIN_Q4       = 53,
  parameter int unsigned DEADBAND_Q8   = 38,
  parameter int unsigned VISIT_STEPS   = 256
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  input  logic                                        enable,
  input  logic [N_SLAVES-1:0][CODE_W+CODE_FRAC-1:0]   target,
  input  logic [CODE_W-1:0]                           code,
  input  logic                                        code_valid,
  output logic [SEL_W-1:0]                            sel,
  output logic                                        step_req,
  output logic [SEL_W-1:0]                            step_ch,
  output pi_step_t                                    step,
  output logic [N_SLAVES-1:0]                         locked,
  output logic                                        meas_strobe,
  output logic [SEL_W-1:0]                            meas_ch,
  output logic [CODE_W+CODE_FRAC-1:0]                 meas_q8,
  output logic                                        meas_inrange
);

  localparam int unsigned QW      = CODE_W + CODE_FRAC;
  localparam int unsigned SUM_W   = CODE_W + AVG_LOG2;
  localparam int unsigned CNT_W   = AVG_LOG2 + 2;
  localparam int unsigned SET_W   = $clog2(SETTLE_CYCLES + 1);
  localparam int unsigned VIS_W   = $clog2(VISIT_STEPS + 1);
  localparam int unsigned SHR     = (AVG_LOG2 > CODE_FRAC) ? AVG_LOG2 - CODE_FRAC : 0;
  localparam int unsigned SHL     = (AVG_LOG2 < CODE_FRAC) ? CODE_FRAC - AVG_LOG2 : 0;
  localparam int unsigned PROD_W  = QW + 8;
  localparam int unsigned PROD_SH = CODE_FRAC + 4;

  ctrl_state_t       state;
  logic [SEL_W-1:0]  ch;
  logic [SET_W-1:0]  settle_cnt;
  logic [SUM_W-1:0]  sum;
  logic [CNT_W-1:0]  n_valid;
  logic [CNT_W-1:0]  n_total;
  logic [VIS_W-1:0]  visit_steps;

  // Mean of the measurement window as a Q.8 bin count.
  logic [QW-1:0]     mean_q8;
  logic [QW:0]       err;        // mean - target, two's complement
  logic [QW-1:0]     err_mag;
  logic [PROD_W-1:0] prod;
  logic [PROD_W-1:0] w_raw;
  logic [3:0]        w_step;
  logic              in_range;
  logic              in_band;
  logic [SEL_W-1:0]  ch_next;

  always_comb begin
    mean_q8  = QW'((QW + SUM_W)'(sum) << SHL >> SHR);
    err      = {1'b0, mean_q8} - {1'b0, target[ch]};
    err_mag  = err[QW] ? QW'(-err) : err[QW-1:0];
    prod     = PROD_W'(err_mag) * PROD_W'(GAIN_Q4);
    w_raw    = (prod + (PROD_W'(1) << (PROD_SH - 1))) >> PROD_SH;
    if (w_raw > PROD_W'(W_PI_MAX))      w_step = 4'(W_PI_MAX);
    else if (w_raw < PROD_W'(W_PI_MIN)) w_step = 4'(W_PI_MIN);
    else                                w_step = w_raw[3:0];
    in_range = (n_valid == CNT_W'(1 << AVG_LOG2));
    in_band  = in_range && (err_mag <= QW'(DEADBAND_Q8));
    ch_next  = (ch == SEL_W'(N_SLAVES - 1)) ? '0 : ch + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= ST_IDLE;
      ch           <= '0;
      sel          <= '0;
      settle_cnt   <= '0;
      sum          <= '0;
      n_valid      <= '0;
      n_total      <= '0;
      visit_steps  <= '0;
      step_req     <= 1'b0;
      step_ch      <= '0;
      step         <= '0;
      locked       <= '0;
      meas_strobe  <= 1'b0;
      meas_ch      <= '0;
      meas_q8      <= '0;
      meas_inrange <= 1'b0;
    end else begin
      step_req    <= 1'b0;
      meas_strobe <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          if (enable) begin
            ch    <= '0;
            state <= ST_SELECT;
          end
        end
        ST_SELECT: begin
          sel         <= ch;
          settle_cnt  <= SET_W'(SETTLE_CYCLES);
          visit_steps <= '0;
          state       <= ST_SETTLE;
        end
        ST_SETTLE: begin
          if (settle_cnt == '0) begin
            sum     <= '0;
            n_valid <= '0;
            n_total <= '0;
            state   <= ST_MEASURE;
          end else begin
            settle_cnt <= settle_cnt - 1'b1;
          end
        end
        ST_MEASURE: begin
          n_total <= n_total + 1'b1;
          if (code_valid) begin
            sum     <= sum + SUM_W'(code);
            n_valid <= n_valid + 1'b1;
          end
          if ((code_valid && n_valid == CNT_W'((1 << AVG_LOG2) - 1)) ||
              n_total == CNT_W'((2 << AVG_LOG2) - 1))
            state <= ST_DECIDE;
        end
        ST_DECIDE: begin
          meas_strobe  <= 1'b1;
          meas_ch      <= ch;
          meas_q8      <= mean_q8;
          meas_inrange <= in_range;
          if (!enable) begin
            state <= ST_IDLE;
          end else if (in_band) begin
            locked[ch] <= 1'b1;
            ch         <= ch_next;
            state      <= ST_SELECT;
          end else begin
            locked[ch]  <= 1'b0;
            step_req    <= 1'b1;
            step_ch     <= ch;
            step.delay  <= in_range ? ~err[QW] : 1'b1;
            step.w      <= in_range ? w_step : 4'(W_PI_MAX);
            visit_steps <= visit_steps + 1'b1;
            settle_cnt  <= SET_W'(SETTLE_CYCLES);
            if (visit_steps == VIS_W'(VISIT_STEPS - 1)) begin
              ch    <= ch_next;
              state <= ST_SELECT;
            end else begin
              state <= ST_SETTLE;
            end
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // A PI step weight is always within the range the transceiver accepts.
  a_step_weight : assert property (@(posedge clk) disable iff (!rst_n)
    step_req |-> (step.w >= 4'(W_PI_MIN)));

  // Steps are at least SETTLE_CYCLES apart; the clock crossing needs 8.
  initial begin
    assert (SETTLE_CYCLES >= 8)
      else $error("pi_control: SETTLE_CYCLES must be at least 8");
  end

endmodule
