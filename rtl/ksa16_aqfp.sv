// ksa16_aqfp: 16-bit parallel-prefix (Kogge-Stone) adder built, gate for
// gate, the way an AQFP circuit is built: every gate is a three-input
// majority gate latched by a four-phase power-clock.
//
// Data path (positions count clocked rows; the default has a driver buffer
// after every gate row, so each gate row takes two positions):
//   pos  0- 1  ksa_pg          generate g = a&b, propagate p = a|b
//   pos  2- 3  ksa_pg          half sum h = a^b           (beside level 0)
//   pos  2- 9  ksa_prefix_tree four Kogge-Stone levels, spans 1, 2, 4, 8
//   pos  4- 9  aqfp_buffer     delays h to meet the carries
//   pos 10-13  ksa_sum         two-row XOR s = h ^ carry, carry out
// STAGES = (log2(W) + 3) * 2 = 14 clocked rows in all.
//
// Timing: `clk` advances one power-clock phase per edge; aqfp_phase_gen
// turns it into the one-hot `phase` output, and row n latches when phase
// bit (n mod 4) is set. Operands are sampled on the edge where phase[0] is
// set and must be held for the four edges of that excitation cycle; the
// result appears STAGES-1 edges after the sampling edge, i.e. in the middle
// of the fourth excitation cycle, and holds for four edges. One addition
// can start every excitation cycle (every four edges), so about three and a
// half additions are in flight at once.
//
// What follows the design: 16-bit operands, 17-bit result, majority-3 gates
// only, Kogge-Stone prefix tree, four-phase clocking, a driver buffer after
// every logic row. This model's own choices: the gate mapping of g, p, h and
// the XOR, a reset to 0 of every latch, no carry input, and the digital
// phase counter that stands in for the analog AC excitation. W may be
// changed to scale the word size; long-wire repeater rows that a wider
// physical layout would need are not modelled (they only add latency).
module ksa16_aqfp
  import aqfp_pkg::*;
#(
  parameter int unsigned W          = 16,
  parameter bit          DRIVER_BUF = 1'b1
) (
  input  logic         clk,     // one edge per power-clock phase
  input  logic         rst_n,   // synchronous, active low
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output phase_t       phase,   // one-hot: phase excited at the next edge
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned STRIDE = row_stride(DRIVER_BUF);
  localparam int unsigned LEVELS = prefix_levels(W);
  localparam int unsigned STAGES = adder_stages(W, DRIVER_BUF);

  logic [W-1:0] g, p, h, h_late, carry;

  aqfp_phase_gen u_clock (.clk, .rst_n, .phase);

  ksa_pg #(.W(W), .POS(0), .DRIVER_BUF(DRIVER_BUF)) u_pg (
    .clk, .rst_n, .phase, .a, .b, .g, .p, .h);

  ksa_prefix_tree #(.W(W), .POS(STRIDE), .DRIVER_BUF(DRIVER_BUF)) u_tree (
    .clk, .rst_n, .phase, .g_in(g), .p_in(p), .g_out(carry));

  aqfp_buffer #(.W(W), .POS(2*STRIDE), .DEPTH((LEVELS-1)*STRIDE)) u_h_delay (
    .clk, .rst_n, .phase, .d(h), .q(h_late));

  ksa_sum #(.W(W), .POS((LEVELS+1)*STRIDE), .DRIVER_BUF(DRIVER_BUF)) u_sum (
    .clk, .rst_n, .phase, .h(h_late), .g(carry), .sum, .cout);

  // The last gate row of ksa_sum is the final position of the pipeline.
  initial assert (STAGES == (LEVELS+3)*STRIDE);

endmodule
