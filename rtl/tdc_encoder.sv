`timescale 1ps/1fs
// tdc_encoder: turns the thermometer code sampled from the TDC delay line
// into a binary bin number.
//
// The hit signal is a clock, so the sampled line holds a stretch of its
// waveform. Taps nearer the input show later moments. A rising edge of the
// hit that happened D taps before the sampling edge shows as ones on taps
// 0..D-2 and a zero on tap D-1 (the older, still-low level). The encoder
// looks for the lowest k with therm[k] = 1 and therm[k+1] = 0 and reports
// code = k+1, the number of taps the rising edge has travelled, i.e. the time
// from the hit's rising edge to the sampling clock edge in bins. If no such
// pattern exists (the edge lies outside the line) valid is low.
//
// Interface: therm in, registered code and valid out, one clock of latency.
// From the document: the thermometer-to-binary role of the encoder. This
// design's choices: rising-edge search rather than a ones count (a clock as
// hit leaves both edges in the line), lowest match wins over bubbles, one
// output register, synchronous clear on rst_n low.
module tdc_encoder #(
  parameter int unsigned TAPS   = 613,
  parameter int unsigned CODE_W = $clog2(TAPS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TAPS-1:0]   therm,
  output logic [CODE_W-1:0] code,
  output logic              valid
);

  logic [CODE_W-1:0] pos;
  logic              found;

  always_comb begin
    pos   = '0;
    found = 1'b0;
    // Scan from the far end so the lowest matching k is the one kept.
    for (int k = TAPS - 2; k >= 0; k--) begin
      if (therm[k] && !therm[k+1]) begin
        pos   = CODE_W'(k + 1);
        found = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      code  <= '0;
      valid <= 1'b0;
    end else begin
      code  <= pos;
      valid <= found;
    end
  end

endmodule
