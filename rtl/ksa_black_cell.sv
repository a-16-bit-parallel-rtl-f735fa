// ksa_black_cell: black prefix cell of the majority-gate Kogge-Stone adder.
//
// Merges a high group (gh, ph) with the adjacent low group (gl, pl):
//   g = gh | (ph & gl) = maj(gh, ph, gl)
//   p = gh | (ph & pl) = maj(gh, ph, pl)
// Here p is the "carry-alive" propagate: the group passes on a 1 when a 1
// comes in. At bit level it is a|b (ksa_pg), and in every group a generate
// implies its propagate. That implication is what makes each majority gate
// equal to the AND-OR beside it, and the p formula keeps it true for the
// merged group (with the plain ph & pl it would not be, and the next level
// would go wrong). Two gates, one row, both latched on phase POS mod 4; no
// gate needs a constant input.
module ksa_black_cell
  import aqfp_pkg::*;
#(
  parameter int unsigned POS = 0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t phase,
  input  logic   gh,
  input  logic   ph,
  input  logic   gl,
  input  logic   pl,
  output logic   g,
  output logic   p
);

  aqfp_maj3 #(.W(1), .POS(POS)) u_g (
    .clk, .rst_n, .phase, .a(gh), .b(ph), .c(gl), .y(g));

  aqfp_maj3 #(.W(1), .POS(POS)) u_p (
    .clk, .rst_n, .phase, .a(gh), .b(ph), .c(pl), .y(p));

endmodule
