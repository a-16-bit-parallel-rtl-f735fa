// ksa_gray_cell: gray prefix cell of the majority-gate Kogge-Stone adder.
//
// Used where the merged group reaches bit 0, so only its generate (the carry
// out of that bit) is needed afterwards:
//   g = gh | (ph & gl) = maj(gh, ph, gl)
// One majority gate, latched on phase POS mod 4.
module ksa_gray_cell
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
  output logic   g
);

  aqfp_maj3 #(.W(1), .POS(POS)) u_g (
    .clk, .rst_n, .phase, .a(gh), .b(ph), .c(gl), .y(g));

endmodule
