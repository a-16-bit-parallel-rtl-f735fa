// ksa_prefix_tree: Kogge-Stone carry prefix tree of majority gates.
//
// Takes the bitwise generate/propagate pairs and, in log2(W) levels, turns
// each g[i] into the generate of the whole group [i:0], which is the carry
// out of bit i. Level k (span d = 2**k) combines bit i with bit i-d:
//   i >= 2d       black cell (group generate and carry-alive propagate)
//   d <= i < 2d   gray cell  (the group now reaches bit 0: generate only)
//   i < d         a buffer carries g[i] on unchanged
// Every bit is handled in every level, which is the Kogge-Stone shape: the
// tree is as shallow as possible and fan-out is one per level, at the price
// of wires that span d bit slices (half the word in the last level).
//
// Level k is a gate row at position POS + k*stride, followed by a driver
// buffer row when DRIVER_BUF is set (stride 2, else 1). Propagate bits that
// no later cell reads (i < 2d after level k) are not carried on and read as
// 0. The output is valid after position POS + levels*stride - 1.
module ksa_prefix_tree
  import aqfp_pkg::*;
#(
  parameter int unsigned W          = 16,
  parameter int unsigned POS        = 1,
  parameter bit          DRIVER_BUF = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  phase_t       phase,
  input  logic [W-1:0] g_in,
  input  logic [W-1:0] p_in,
  output logic [W-1:0] g_out
);

  localparam int unsigned STRIDE = row_stride(DRIVER_BUF);
  localparam int unsigned LEVELS = prefix_levels(W);

  // gs[k]/ps[k]: inputs of level k, i.e. groups of 2**k bits (fewer at the
  // bottom of the word).
  logic [W-1:0] gs [LEVELS+1];
  logic [W-1:0] ps [LEVELS+1];

  assign gs[0] = g_in;
  assign ps[0] = p_in;

  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    localparam int unsigned D   = 1 << k;
    localparam int unsigned ROW = POS + k*STRIDE;

    logic [W-1:0] g_row, p_row;

    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= 2*D) begin : g_black
        ksa_black_cell #(.POS(ROW)) u_cell (
          .clk, .rst_n, .phase,
          .gh(gs[k][i]), .ph(ps[k][i]), .gl(gs[k][i-D]), .pl(ps[k][i-D]),
          .g(g_row[i]), .p(p_row[i]));
      end else if (i >= D) begin : g_gray
        ksa_gray_cell #(.POS(ROW)) u_cell (
          .clk, .rst_n, .phase,
          .gh(gs[k][i]), .ph(ps[k][i]), .gl(gs[k][i-D]),
          .g(g_row[i]));
        assign p_row[i] = 1'b0;
      end else begin : g_pass
        aqfp_buffer #(.W(1), .POS(ROW), .DEPTH(1)) u_buf (
          .clk, .rst_n, .phase, .d(gs[k][i]), .q(g_row[i]));
        assign p_row[i] = 1'b0;
      end
    end

    aqfp_buffer #(.W(2*W), .POS(ROW+1), .DEPTH(STRIDE-1)) u_drv (
      .clk, .rst_n, .phase, .d({g_row, p_row}), .q({gs[k+1], ps[k+1]}));
  end

  assign g_out = gs[LEVELS];

endmodule
