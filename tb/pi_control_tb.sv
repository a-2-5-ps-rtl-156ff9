`timescale 1ps/1fs
// pi_control_tb: closes the controller's loop around a numeric stand-in for
// the TDC and two slave transceivers. Each slave i has a true mean skew q[i]
// in TDC bins; while it is selected, each cycle's code is floor(q + u) with u
// uniform in [0,1) (valid only inside bins 1..612), and a PI step of weight W
// moves q by W * 3.125 / 10.44 bins (down for a delaying step).
//
// At every measurement report it checks, from q and the target alone:
//   - the reported mean agrees with q,
//   - a mean within the deadband locks the channel and issues no step,
//   - otherwise exactly one step follows, with W = round(|error|*53/16),
//     held to 1..15, in the direction that reduces the error,
//   - a channel without enough valid codes gets a full delaying step,
//   - reports follow each other every 82 cycles (17 settle + 64 measure +
//     1 decide), 83 after a channel change, 64 more without valid codes.
// Slave 0 starts below its target (advancing steps), slave 1 outside the line
// (out-of-range steps, then coarse and fine delaying steps). Both must lock
// and stay locked; after enable falls no further steps may come.
module pi_control_tb;
  import tsync_pkg::*;

  localparam real BINS_PER_W = 3.125 / 10.44;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                enable = 1'b0;
  logic [1:0][17:0]    target;
  logic [9:0]          code;
  logic                code_valid;
  logic                sel;
  logic                step_req;
  logic                step_ch;
  pi_step_t            step;
  logic [1:0]          locked;
  logic                meas_strobe;
  logic                meas_ch;
  logic [17:0]         meas_q8;
  logic                meas_inrange;

  real q [2];
  int checks = 0;
  int failures = 0;
  int n_outrange = 0, n_coarse = 0, n_fine = 0, n_adv = 0, n_del = 0, n_lock = 0, n_switch = 0;
  longint cycle = 0;
  longint last_strobe_cycle = -1;
  logic   last_strobe_ch = 1'b0;
  logic   last_strobe_locked = 1'b0;

  pi_control dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .target(target),
    .code(code), .code_valid(code_valid), .sel(sel),
    .step_req(step_req), .step_ch(step_ch), .step(step), .locked(locked),
    .meas_strobe(meas_strobe), .meas_ch(meas_ch), .meas_q8(meas_q8),
    .meas_inrange(meas_inrange)
  );

  always #3200 clk = ~clk;

  initial begin
    #(64'd6400 * 200000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // TDC stand-in: one code per cycle for the selected slave.
  always @(posedge clk) begin
    automatic int c = int'($floor(q[sel] + real'($urandom_range(9999)) / 10000.0));
    cycle <= cycle + 1;
    code_valid <= (c >= 1) && (c <= 612);
    code       <= 10'(c < 0 ? 0 : (c > 1023 ? 1023 : c));
  end

  // Checks on every measurement report, and the plant's response to steps.
  always @(posedge clk) begin
    if (rst_n && meas_strobe) begin
      automatic real mean = real'(meas_q8) / 256.0;
      automatic real tgt  = real'(target[meas_ch]) / 256.0;
      automatic real err  = mean - tgt;
      automatic int  w_exp;
      // Cycle spacing: settle 17, measure 64 when every code is valid (128
      // when too few are), decide 1, plus 1 for a channel change.
      if (last_strobe_cycle >= 0) begin
        automatic longint base = (last_strobe_locked ? 1 : 0) + 17 + 1;
        automatic longint gap  = cycle - last_strobe_cycle;
        if (!meas_inrange) begin
          checks++;
          if (gap != base + 128) begin
            failures++;
            $display("FAIL spacing %0d cycles, expected %0d", gap, base + 128);
          end
        end else if (q[meas_ch] >= 2.0 && q[meas_ch] <= 610.0) begin
          checks++;
          if (gap != base + 64) begin
            failures++;
            $display("FAIL spacing %0d cycles, expected %0d", gap, base + 64);
          end
        end
      end
      last_strobe_cycle = cycle;
      if (meas_inrange) begin
        checks++;
        if (mean - q[meas_ch] > 0.35 || q[meas_ch] - mean > 0.35) begin
          failures++;
          $display("FAIL mean %f, true %f", mean, q[meas_ch]);
        end
        if (err <= 38.0 / 256.0 && err >= -38.0 / 256.0) begin
          n_lock++;
          checks++;
          if (step_req) begin failures++; $display("FAIL step inside deadband"); end
          last_strobe_locked = 1'b1;
        end else begin
          w_exp = int'($floor((err < 0 ? -err : err) * 53.0 / 16.0 + 0.5));
          if (w_exp > 15) w_exp = 15;
          if (w_exp < 1) w_exp = 1;
          // The DUT rounds the Q.8 error; allow one unit at a rounding tie.
          checks++;
          if (!step_req || step_ch !== meas_ch || step.delay !== (err > 0) ||
              (int'(step.w) - w_exp > 1 || w_exp - int'(step.w) > 1)) begin
            failures++;
            $display("FAIL step: req=%b ch=%b delay=%b w=%0d, expected w=%0d err=%f",
                     step_req, step_ch, step.delay, step.w, w_exp, err);
          end
          last_strobe_locked = 1'b0;
        end
      end else begin
        n_outrange++;
        checks++;
        if (!step_req || step.delay !== 1'b1 || step.w !== 4'd15) begin
          failures++;
          $display("FAIL out-of-range step: req=%b delay=%b w=%0d", step_req, step.delay, step.w);
        end
        last_strobe_locked = 1'b0;
      end
    end
    if (rst_n && step_req) begin
      if (step.w == 4'd15) n_coarse++; else n_fine++;
      if (step.delay) n_del++; else n_adv++;
      if (step.delay) q[step_ch] = q[step_ch] - step.w * BINS_PER_W;
      else            q[step_ch] = q[step_ch] + step.w * BINS_PER_W;
    end
    if (meas_strobe && last_strobe_locked) begin
      n_switch++;
      // The visit order changes channel after a lock; with 2 slaves the next
      // report is on the other one.
      last_strobe_ch = meas_ch;
    end
  end

  initial begin
    q[0] = 200.0;
    q[1] = 615.0;
    target[0] = 18'(int'(250.5 * 256));
    target[1] = 18'(int'(100.25 * 256));
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    enable = 1'b1;
    wait (locked == 2'b11);
    // Stay running for a number of visits; the lock must hold.
    repeat (40) @(posedge meas_strobe);
    checks++;
    if (locked !== 2'b11) begin failures++; $display("FAIL lock lost: %b", locked); end
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (q[i] - real'(target[i]) / 256.0 > 0.4 || real'(target[i]) / 256.0 - q[i] > 0.4) begin
        failures++;
        $display("FAIL slave %0d ends at %f bins, target %f", i, q[i], real'(target[i]) / 256.0);
      end
    end
    // Stop: once the current visit ends no more steps.
    enable = 1'b0;
    repeat (100) @(posedge clk);
    begin
      automatic int late = 0;
      repeat (1000) @(posedge clk) if (step_req) late++;
      checks++;
      if (late != 0) begin failures++; $display("FAIL %0d steps after disable", late); end
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
