`timescale 1ps/1fs
// tdl_carry_chain: behavioural model of the tapped delay line (TDL) of the
// TDC, built in the FPGA from a chain of CARRY8 primitives. It is a model,
// not synthesizable logic: the line's whole function is the propagation
// delay of a process-specific carry chain, which only a vendor primitive
// placed in silicon provides.
//
// The hit signal enters CIN of the first CARRY8 and ripples up the carry-out
// bits CO0..CO7 of each CARRY8 in turn, each carry-out adding CO_DELAY_PS.
// The divided factor M says how many of the 8 carry-out bits of one CARRY8
// are brought out as taps: every (8/M)-th carry-out is sampled, so M = 4
// takes CO1, CO3, CO5 and CO7. Tap k therefore shows the hit signal as it
// was (k+1)*(8/M)*CO_DELAY_PS ago.
//
// Interface: hit in, taps[TAPS-1:0] out, taps[0] nearest the input. There is
// no clock; the sampling flip-flops sit in the tdc module. All taps start
// low at time zero.
//
// From the document: the CARRY8 chain, the factor M (default 4, its main
// setting) and 613 taps spanning the 6.4 ns system clock period at M = 4.
// This model's choices: a uniform delay per carry-out, 5.22 ps, which makes
// the 613 taps of M = 4 span 6.4 ns (10.44 ps per tap); a real chain has
// strongly non-uniform bins.
module tdl_carry_chain #(
  parameter int unsigned TAPS        = 613,
  parameter int unsigned M           = 4,
  parameter real         CO_DELAY_PS = 5.22
) (
  input  logic            hit,
  output logic [TAPS-1:0] taps
);

  localparam int unsigned STRIDE   = 8 / M;

  localparam real TAP_DELAY_PS = STRIDE * CO_DELAY_PS;

  // Every change of hit launches one ripple that walks up the chain, writing
  // its level into tap k (k+1)*TAP_DELAY_PS after the change. Ripples of
  // successive edges run side by side, each behind the one before, exactly
  // as successive edges travel along a real carry chain. (One process per
  // edge rather than one per carry-out keeps simulation fast.)
  initial begin
    taps = '0;
    forever begin
      @(hit);
      fork
        begin : ripple
          automatic logic level = hit;
          for (int k = 0; k < TAPS; k++) begin
            #(TAP_DELAY_PS);
            taps[k] = level;
          end
        end
      join_none
    end
  end

  initial begin
    assert (M == 1 || M == 2 || M == 4 || M == 8)
      else $error("tdl_carry_chain: M must divide the 8 carry-out bits");
  end

endmodule
