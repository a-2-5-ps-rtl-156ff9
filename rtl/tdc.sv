`timescale 1ps/1fs
// tdc: time-to-digital converter measuring where the hit signal's rising edge
// lies within one period of the reference clock.
//
// The hit runs into a tapped delay line (tdl_carry_chain). On every rising
// edge of ref_clk a row of flip-flops captures all taps at once, and the
// encoder converts that thermometer code into the bin count between the
// hit's last rising edge and the ref_clk edge. With the defaults (613 taps,
// M = 4) one bin is about 10.4 ps and the line spans the 6.4 ns period.
//
// Interface: hit and ref_clk in; code and valid out in the ref_clk domain.
// Timing: a code appears two ref_clk edges after the edge that sampled it
// (flip-flop row, then encoder register); one code per ref_clk cycle.
// rst_n is synchronous to ref_clk and clears the flip-flop row (the DFFs of
// the sketch have a clear) and the encoder output.
// From the document: TDL + DFF row clocked by the reference clock + encoder,
// 613 taps at M = 4. This design's choice: a single sampling row, with no
// further synchroniser stage.
module tdc #(
  parameter int unsigned TAPS        = 613,
  parameter int unsigned M           = 4,
  parameter real         CO_DELAY_PS = 5.22,
  parameter int unsigned CODE_W      = $clog2(TAPS + 1)
) (
  input  logic              ref_clk,
  input  logic              rst_n,
  input  logic              hit,
  output logic [CODE_W-1:0] code,
  output logic              valid
);

  logic [TAPS-1:0] taps;
  logic [TAPS-1:0] sampled;

  tdl_carry_chain #(
    .TAPS        (TAPS),
    .M           (M),
    .CO_DELAY_PS (CO_DELAY_PS)
  ) u_tdl (
    .hit  (hit),
    .taps (taps)
  );

  always_ff @(posedge ref_clk) begin
    if (!rst_n) sampled <= '0;
    else        sampled <= taps;
  end

  tdc_encoder #(
    .TAPS   (TAPS),
    .CODE_W (CODE_W)
  ) u_enc (
    .clk   (ref_clk),
    .rst_n (rst_n),
    .therm (sampled),
    .code  (code),
    .valid (valid)
  );

endmodule
