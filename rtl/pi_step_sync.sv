`timescale 1ps/1fs
// pi_step_sync: carries one PI step command from the controller's clock
// (the master channel's parallel clock) into one slave transceiver's own
// parallel-clock domain, where the transceiver's phase-interpolator port is
// sampled.
//
// All channels run at the same frequency but at an unknown phase to one
// another, so a one-cycle pulse cannot be passed straight across. The
// controller side flips a toggle and holds the command; the slave side
// passes the toggle through two flip-flops and, when it sees it change,
// raises pi_en for exactly one slave cycle with the held command on
// pi_stepsize ({direction, W_pi[3:0]}).
//
// Timing: pi_en follows req by two to four slave cycles. A new req must not
// come within 8 controller cycles of the previous one, so that the held
// command is stable when the slave side copies it; the controller's settle
// time guarantees that.
// The whole module is this design's own: the document shows the controller
// driving each transceiver's PI but says nothing of the clock crossing.
module pi_step_sync
  import tsync_pkg::*;
(
  input  logic     clk_m,
  input  logic     rst_n,
  input  logic     req,
  input  pi_step_t step,
  input  logic     clk_s,
  output logic     pi_en,
  output pi_step_t pi_stepsize
);

  logic     toggle_m;
  pi_step_t hold_m;
  logic     sync1, sync2, sync3;

  always_ff @(posedge clk_m) begin
    if (!rst_n) begin
      toggle_m <= 1'b0;
      hold_m   <= '0;
    end else if (req) begin
      toggle_m <= ~toggle_m;
      hold_m   <= step;
    end
  end

  always_ff @(posedge clk_s) begin
    if (!rst_n) begin
      sync1       <= 1'b0;
      sync2       <= 1'b0;
      sync3       <= 1'b0;
      pi_en       <= 1'b0;
      pi_stepsize <= '0;
    end else begin
      sync1 <= toggle_m;
      sync2 <= sync1;
      sync3 <= sync2;
      pi_en <= sync2 ^ sync3;
      if (sync2 ^ sync3) pi_stepsize <= hold_m;
    end
  end

endmodule
