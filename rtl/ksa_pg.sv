// ksa_pg: pre-processing rows of the majority-gate Kogge-Stone adder.
//
// For every bit i of the operands it forms
//   generate   g[i] = a[i] & b[i] = maj(a, b, 0)
//   propagate  p[i] = a[i] | b[i] = maj(a, b, 1)
//   half sum   h[i] = a[i] ^ b[i] = maj(p, ~g, 0)
// Propagate is the OR form rather than the XOR form. With OR-propagate every
// generate implies its propagate, which is what lets one majority gate do the
// job of a prefix cell's AND-OR (see ksa_black_cell). The half sum then needs
// its own gate row; it is built from g and p so that the operands are read
// only once.
//
// Rows: g/p at position POS, h at POS + stride, where stride is 2 with
// DRIVER_BUF (every gate row is followed by a buffer row that drives the
// next row) and 1 without. g/p are valid after position POS + stride - 1,
// h after POS + 2*stride - 1. The majority-only construction and the driver
// buffers follow the design; the exact gate mapping of g, p and h is this
// model's own.
module ksa_pg
  import aqfp_pkg::*;
#(
  parameter int unsigned W          = 16,
  parameter int unsigned POS        = 0,
  parameter bit          DRIVER_BUF = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  phase_t       phase,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] g,
  output logic [W-1:0] p,
  output logic [W-1:0] h
);

  localparam int unsigned STRIDE = row_stride(DRIVER_BUF);

  logic [W-1:0] g_gate, p_gate, h_gate;

  aqfp_maj3 #(.W(W), .POS(POS)) u_gen (
    .clk, .rst_n, .phase, .a(a), .b(b), .c('0), .y(g_gate));

  aqfp_maj3 #(.W(W), .POS(POS)) u_prop (
    .clk, .rst_n, .phase, .a(a), .b(b), .c('1), .y(p_gate));

  aqfp_buffer #(.W(2*W), .POS(POS+1), .DEPTH(STRIDE-1)) u_gp_drv (
    .clk, .rst_n, .phase, .d({g_gate, p_gate}), .q({g, p}));

  aqfp_maj3 #(.W(W), .POS(POS+STRIDE), .INV_B(1'b1)) u_half (
    .clk, .rst_n, .phase, .a(p), .b(g), .c('0), .y(h_gate));

  aqfp_buffer #(.W(W), .POS(POS+STRIDE+1), .DEPTH(STRIDE-1)) u_h_drv (
    .clk, .rst_n, .phase, .d(h_gate), .q(h));

endmodule
