`timescale 1ps/1fs
// tdc_tb: runs the TDC with a 6.4 ns reference clock and a hit clock of the
// same period whose rising edge leads the reference edge by d picoseconds.
// With a uniform bin of tau = 10.44 ps, tap k has seen the rising edge when
// (k+1)*tau < d, so the expected code is ceil(d/tau) - 1. Checked for a
// series of offsets across the line, for an edge too close to the reference
// edge (no valid code), and for the two-cycle latency after reset.
module tdc_tb;
  localparam real PERIOD = 6400.0;
  localparam real TAU    = 10.44;

  logic       ref_clk = 1'b0;
  logic       rst_n   = 1'b0;
  logic       hit     = 1'b0;
  logic [9:0] code;
  logic       valid;
  real        d_ps    = 1000.0;
  int checks = 0;
  int failures = 0;

  tdc dut (.ref_clk(ref_clk), .rst_n(rst_n), .hit(hit), .code(code), .valid(valid));

  // Reference clock: rising edges at n*PERIOD.
  initial forever begin
    #(PERIOD / 2.0) ref_clk = 1'b1;
    #(PERIOD / 2.0) ref_clk = 1'b0;
  end

  // Hit clock: rising edges d_ps ahead of each reference edge.
  initial forever begin
    real next_ref;
    next_ref = PERIOD * ($floor($realtime / PERIOD) + 1.0) + PERIOD / 2.0;
    if (next_ref - d_ps <= $realtime) next_ref = next_ref + PERIOD;
    #(next_ref - d_ps - $realtime);
    hit = 1'b1;
    #(PERIOD / 2.0);
    hit = 1'b0;
  end

  initial begin
    #(PERIOD * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic real offs [9] = '{15.0, 100.0, 777.7, 1500.3, 3199.0, 3300.0, 4567.8, 6000.0, 6390.0};
    int  expected;
    // Reset is low for the edges up to the fourth; it rises between edges.
    repeat (4) @(posedge ref_clk);
    #1;
    rst_n = 1'b1;
    @(posedge ref_clk); #1;       // flip-flop row samples here
    checks++;
    if (valid !== 1'b0) begin failures++; $display("FAIL valid one cycle early"); end
    @(posedge ref_clk); #1;       // encoder output registered here
    checks++;
    if (valid !== 1'b1 || code !== 10'(int'($ceil(1000.0 / TAU)) - 1)) begin
      failures++;
      $display("FAIL latency: valid=%b code=%0d", valid, code);
    end
    foreach (offs[i]) begin
      d_ps = offs[i];
      repeat (6) @(posedge ref_clk);
      #1;
      expected = int'($ceil(offs[i] / TAU)) - 1;
      checks++;
      if (!valid || code != 10'(expected)) begin
        failures++;
        $display("FAIL d=%f code=%0d valid=%b expected %0d", offs[i], code, valid, expected);
      end
    end
    // Rising edge 5 ps before the reference edge: inside the first bin.
    d_ps = 5.0;
    repeat (6) @(posedge ref_clk);
    #1;
    checks++;
    if (valid) begin failures++; $display("FAIL edge in first bin gave code %0d", code); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
