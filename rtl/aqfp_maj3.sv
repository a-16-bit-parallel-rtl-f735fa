// aqfp_maj3: a row of clocked AQFP three-input majority gates.
//
// Each of the W gates computes maj(a^INV_A, b^INV_B, c^INV_C) and latches
// the result on the excitation phase POS mod 4, holding it until the same
// phase comes round again; this is how an AQFP gate behaves under its
// power-clock. Input inversion is a property of the gate (its input
// transformer is wound the other way), hence the INV_* parameters. A constant
// 0 or 1 on input c turns the gate into AND or OR. The adder uses only
// three-input majority gates; the per-input inversion option and the
// synchronous reset to 0 are this model's conventions.
//
// Timing: y changes only at the clk edge of phase POS mod 4, one phase after
// the row that feeds it.
module aqfp_maj3
  import aqfp_pkg::*;
#(
  parameter int unsigned W     = 1,
  parameter int unsigned POS   = 0,
  parameter bit          INV_A = 1'b0,
  parameter bit          INV_B = 1'b0,
  parameter bit          INV_C = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  phase_t       phase,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y
);

  localparam int unsigned PH = POS % NUM_PHASES;

  logic [W-1:0] m;

  always_comb begin
    for (int i = 0; i < W; i++)
      m[i] = maj3(a[i] ^ INV_A, b[i] ^ INV_B, c[i] ^ INV_C);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)         y <= '0;
    else if (phase[PH]) y <= m;
  end

endmodule
