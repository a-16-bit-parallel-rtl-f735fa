// ksa_sum: post-processing rows of the majority-gate Kogge-Stone adder.
//
// Forms s[i] = h[i] ^ c[i], where h is the half sum a^b and c[i] the carry
// into bit i, i.e. the group generate g[i-1:0] from the prefix tree (there
// is no carry input, so c[0] = 0 and s[0] = h[0]). A majority-gate XOR takes
// two rows:
//   row 1:  t1 = maj(h, ~c, 0) = h & ~c      t2 = maj(~h, c, 0) = ~h & c
//   row 2:  s  = maj(t1, t2, 1) = t1 | t2
// Bit 0 and the carry out g[W-1:0] are carried through both rows by buffers
// so that all W+1 result bits leave on the same phase.
//
// Inputs h and g must be valid at the same position. Row 1 is at POS, row 2
// at POS + stride (stride 2 with DRIVER_BUF, else 1); the result is valid
// after position POS + 2*stride - 1. The gate mapping of the XOR is this
// model's own.
module ksa_sum
  import aqfp_pkg::*;
#(
  parameter int unsigned W          = 16,
  parameter int unsigned POS        = 9,
  parameter bit          DRIVER_BUF = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  phase_t       phase,
  input  logic [W-1:0] h,
  input  logic [W-1:0] g,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned STRIDE = row_stride(DRIVER_BUF);

  // Carry into bit i is the generate of group [i-1:0].
  logic [W-1:1] c;
  assign c = g[W-2:0];

  logic [W-1:1] t1_gate, t2_gate, t1, t2, s_gate;
  logic         s0, s0_mid, co_mid;

  // Row 1.
  aqfp_maj3 #(.W(W-1), .POS(POS), .INV_B(1'b1)) u_t1 (
    .clk, .rst_n, .phase, .a(h[W-1:1]), .b(c[W-1:1]), .c('0), .y(t1_gate));

  aqfp_maj3 #(.W(W-1), .POS(POS), .INV_A(1'b1)) u_t2 (
    .clk, .rst_n, .phase, .a(h[W-1:1]), .b(c[W-1:1]), .c('0), .y(t2_gate));

  aqfp_buffer #(.W(2), .POS(POS), .DEPTH(STRIDE)) u_pass1 (
    .clk, .rst_n, .phase, .d({h[0], g[W-1]}), .q({s0_mid, co_mid}));

  aqfp_buffer #(.W(2*(W-1)), .POS(POS+1), .DEPTH(STRIDE-1)) u_drv1 (
    .clk, .rst_n, .phase, .d({t1_gate, t2_gate}), .q({t1, t2}));

  // Row 2.
  aqfp_maj3 #(.W(W-1), .POS(POS+STRIDE)) u_or (
    .clk, .rst_n, .phase, .a(t1), .b(t2), .c('1), .y(s_gate));

  aqfp_buffer #(.W(W-1), .POS(POS+STRIDE+1), .DEPTH(STRIDE-1)) u_drv2 (
    .clk, .rst_n, .phase, .d(s_gate), .q(sum[W-1:1]));

  aqfp_buffer #(.W(2), .POS(POS+STRIDE), .DEPTH(STRIDE)) u_pass2 (
    .clk, .rst_n, .phase, .d({s0_mid, co_mid}), .q({s0, cout}));

  assign sum[0] = s0;

endmodule
