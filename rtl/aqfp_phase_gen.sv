// aqfp_phase_gen: digital stand-in for the four-phase AC power-clock.
//
// The real excitation is analog: two AC currents, AC1 and AC2, 90 degrees
// apart, combined with a DC offset so that four distinct phases reach the
// gate rows. This module keeps only the logical effect of that network: a
// counter advanced by `clk` (one edge per phase, so `clk` runs at four times
// the excitation frequency) drives the one-hot `phase` vector. Bit k is high
// for the cycle whose closing edge excites the gate rows of phase k. After
// reset phase 0 fires first. The four phases and their order follow the
// design; representing them as a one-hot enable on a single fast clock is
// this model's own choice.
//
// Interface: clk, rst_n (active-low, synchronous), phase[3:0] one-hot.
module aqfp_phase_gen
  import aqfp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  output phase_t phase
);

  logic [$clog2(NUM_PHASES)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  always_comb begin
    phase = '0;
    phase[cnt] = 1'b1;
  end

endmodule
