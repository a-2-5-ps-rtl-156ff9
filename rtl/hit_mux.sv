`timescale 1ps/1fs
// hit_mux: selects which slave channel's parallel clock is sent to the TDC as
// its hit signal. All slave outputs enter one multiplexer and the controller
// picks one at a time, so a single TDC serves every slave channel.
//
// Interface: slave_clk[N_SLAVES-1:0] and sel in, hit out. Purely
// combinational; a sel beyond the last slave gives a constant low hit.
// From the document: one mux combining all slave channels in front of the
// TDC. This design's choices: the binary select and the out-of-range rule.
module hit_mux #(
  parameter int unsigned N_SLAVES = 2,
  parameter int unsigned SEL_W    = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1
) (
  input  logic [N_SLAVES-1:0] slave_clk,
  input  logic [SEL_W-1:0]    sel,
  output logic                hit
);

  always_comb begin
    hit = 1'b0;
    for (int i = 0; i < N_SLAVES; i++) begin
      if (sel == SEL_W'(i)) hit = slave_clk[i];
    end
  end

endmodule
