`timescale 1ps/1fs
// pi_control_visit_tb: checks the controller's fairness rule. With
// VISIT_STEPS = 4 and both slaves far from their targets, the controller
// must leave a slave after exactly 4 unlocked steps and measure the other
// one next, alternating until both are locked. The plant is the same
// numeric stand-in as in pi_control_tb: code = floor(q + u), u in [0,1),
// and a step of weight W moves q by W * 3.125 / 10.44 bins.
module pi_control_visit_tb;
  import tsync_pkg::*;

  localparam real BINS_PER_W = 3.125 / 10.44;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             enable = 1'b0;
  logic [1:0][17:0] target;
  logic [9:0]       code;
  logic             code_valid;
  logic             sel;
  logic             step_req;
  logic             step_ch;
  pi_step_t         step;
  logic [1:0]       locked;
  logic             meas_strobe;
  logic             meas_ch;
  logic [17:0]      meas_q8;
  logic             meas_inrange;

  real q [2];
  int  checks = 0;
  int  failures = 0;
  int  run_len = 0;
  int  handovers = 0;
  logic run_ch = 1'b0;
  logic visit_locked = 1'b1;

  pi_control #(.VISIT_STEPS(4)) dut (
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

  always @(posedge clk) begin
    automatic int c = int'($floor(q[sel] + real'($urandom_range(9999)) / 10000.0));
    code_valid <= (c >= 1) && (c <= 612);
    code       <= 10'(c < 0 ? 0 : (c > 1023 ? 1023 : c));
  end

  // A visit is the run of reports on one slave. A visit that ends without a
  // lock must hold exactly 4 steps; no visit may hold more.
  always @(posedge clk) begin
    if (rst_n && meas_strobe) begin
      if (meas_ch != run_ch) begin
        if (!visit_locked) begin
          checks++;
          if (run_len != 4) begin
            failures++;
            $display("FAIL left slave %0d after %0d steps without lock", run_ch, run_len);
          end else begin
            handovers++;
          end
        end
        run_ch  = meas_ch;
        run_len = 0;
      end
      visit_locked = !step_req;
    end
    if (rst_n && step_req) begin
      run_len++;
      checks++;
      if (run_len > 4) begin
        failures++;
        $display("FAIL %0d steps in one visit to slave %0d", run_len, step_ch);
      end
      if (step.delay) q[step_ch] = q[step_ch] - step.w * BINS_PER_W;
      else            q[step_ch] = q[step_ch] + step.w * BINS_PER_W;
    end
  end

  initial begin
    q[0] = 100.0;
    q[1] = 500.0;
    target[0] = 18'(int'(400.0 * 256));
    target[1] = 18'(int'(120.0 * 256));
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    enable = 1'b1;
    wait (locked == 2'b11);
    $display("hand-overs after 4 unlocked steps: %0d", handovers);
    checks++;
    if (handovers < 4) begin failures++; $display("FAIL too few hand-overs"); end
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (q[i] - real'(target[i]) / 256.0 > 0.4 || real'(target[i]) / 256.0 - q[i] > 0.4) begin
        failures++;
        $display("FAIL slave %0d ends at %f bins", i, q[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
