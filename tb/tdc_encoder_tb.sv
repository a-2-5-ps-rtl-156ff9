`timescale 1ps/1fs
// tdc_encoder_tb: feeds the encoder thermometer codes of the kind a clock
// leaves in the delay line (low after its falling edge, high between its
// edges, low before its rising edge) and checks the registered bin number
// of the rising edge one clock later. Also checks all-low, all-high and
// falling-edge-only lines (no valid code), a bubble ahead of the edge (the
// lowest transition is reported) and synchronous clear.
module tdc_encoder_tb;
  localparam int unsigned TAPS = 613;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic [TAPS-1:0] therm = '0;
  logic [9:0]      code;
  logic            valid;
  int checks = 0;
  int failures = 0;

  tdc_encoder dut (.clk(clk), .rst_n(rst_n), .therm(therm), .code(code), .valid(valid));

  always #3200 clk = ~clk;

  initial begin
    #(6400 * 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Line with ones on taps f..r-1, zeros elsewhere.
  function automatic logic [TAPS-1:0] window(input int f, input int r);
    logic [TAPS-1:0] v = '0;
    for (int k = 0; k < TAPS; k++) v[k] = (k >= f) && (k < r);
    return v;
  endfunction

  task automatic apply(input logic [TAPS-1:0] v, input logic exp_valid, input int exp_code,
                       input string what);
    @(negedge clk);
    therm = v;
    @(posedge clk);
    #1;
    checks++;
    if (valid !== exp_valid || (exp_valid && code !== 10'(exp_code))) begin
      failures++;
      $display("FAIL %s: valid=%b code=%0d, expected %b/%0d", what, valid, code, exp_valid, exp_code);
    end
  endtask

  initial begin
    int r, f;
    repeat (2) @(posedge clk);
    therm = window(0, 100);
    @(posedge clk); #1;
    checks++;
    if (valid !== 1'b0 || code !== '0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1'b1;
    // Rising edge only, no falling edge yet in the line.
    for (int n = 0; n < 150; n++) begin
      r = $urandom_range(TAPS - 1, 1);
      apply(window(0, r), 1'b1, r, "rise only");
    end
    // Both edges: ones between the falling edge f and the rising edge r.
    for (int n = 0; n < 150; n++) begin
      r = $urandom_range(TAPS - 1, 2);
      f = $urandom_range(r - 1, 1);
      apply(window(f, r), 1'b1, r, "both edges");
    end
    apply('0, 1'b0, 0, "all low");
    apply('1, 1'b0, 0, "all high");
    apply(window(200, TAPS), 1'b0, 0, "falling edge only");
    apply(window(1, 2), 1'b1, 2, "narrow");
    apply(window(0, TAPS - 1), 1'b1, TAPS - 1, "last tap");
    // Bubble: a stray zero at tap 40 ahead of the true edge at 300.
    therm = window(0, 300);
    therm[40] = 1'b0;
    apply(therm, 1'b1, 40, "bubble");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
