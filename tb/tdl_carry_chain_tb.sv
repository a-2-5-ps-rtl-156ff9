`timescale 1ps/1fs
// tdl_carry_chain_tb: launches a rising edge into the delay line and looks
// at the taps half a bin after each expected arrival. With a uniform delay
// per carry-out, tap k rises (k+1)*(8/M)*CO_DELAY_PS after the hit, so at
// (n+0.5) bins exactly taps 0..n-1 must be high. Checked for M = 4 with
// 613 taps (10.44 ps bins) and M = 2 with 309 taps (20.88 ps bins); the
// falling edge is checked the same way.
module tdl_carry_chain_tb;
  localparam real CO = 5.22;

  logic       hit;
  logic [612:0] taps4;
  logic [308:0] taps2;
  int checks = 0;
  int failures = 0;

  tdl_carry_chain #(.TAPS(613), .M(4), .CO_DELAY_PS(CO)) dut4 (.hit(hit), .taps(taps4));
  tdl_carry_chain #(.TAPS(309), .M(2), .CO_DELAY_PS(CO)) dut2 (.hit(hit), .taps(taps2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic low_ones4(input logic [612:0] v, input int n);
    for (int k = 0; k < 613; k++) if (v[k] !== (k < n)) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic low_ones2(input logic [308:0] v, input int n);
    for (int k = 0; k < 309; k++) if (v[k] !== (k < n)) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    real t0;
    automatic int ns4 [5] = '{0, 1, 57, 306, 612};
    automatic int ns2 [4] = '{0, 3, 150, 308};
    hit = 1'b0;
    #8000;                       // line settles low
    t0 = $realtime;
    hit = 1'b1;
    // M = 4: one bin is 2 carry-outs.
    foreach (ns4[i]) begin
      #(t0 + (ns4[i] + 0.5) * 2.0 * CO - $realtime);
      checks++;
      if (!low_ones4(taps4, ns4[i])) begin
        failures++;
        $display("FAIL M=4 rise n=%0d", ns4[i]);
      end
    end
    #(t0 + 7000.0 - $realtime);
    checks++;
    if (taps4 !== '1 || taps2 !== '1) begin
      failures++;
      $display("FAIL line not all high after 7 ns");
    end
    // M = 2 on a second edge: one bin is 4 carry-outs.
    hit = 1'b0;
    #8000;
    t0 = $realtime;
    hit = 1'b1;
    foreach (ns2[i]) begin
      #(t0 + (ns2[i] + 0.5) * 4.0 * CO - $realtime);
      checks++;
      if (!low_ones2(taps2, ns2[i])) begin
        failures++;
        $display("FAIL M=2 rise n=%0d", ns2[i]);
      end
    end
    // Falling edge: taps 0..n-1 low, the rest high.
    #(t0 + 8000.0 - $realtime);
    t0 = $realtime;
    hit = 1'b0;
    #(t0 + 100.5 * 2.0 * CO - $realtime);
    checks++;
    if (!low_ones4(~taps4, 100)) begin
      failures++;
      $display("FAIL M=4 fall");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
