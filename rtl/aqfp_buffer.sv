// aqfp_buffer: DEPTH rows of W clocked AQFP buffers.
//
// A buffer is a single-input AQFP gate: it re-amplifies a signal and passes
// it on one phase later. The adder uses buffers in two ways: as the driver
// row placed after every logic row, and as delay rows that keep a signal in
// step with others that still pass through logic. Row k (k = 0..DEPTH-1)
// latches on phase (POS + k) mod 4, so the output trails the input by DEPTH
// phases. DEPTH = 0 is a plain wire (clk, rst_n and phase are then unused).
module aqfp_buffer
  import aqfp_pkg::*;
#(
  parameter int unsigned W     = 1,
  parameter int unsigned POS   = 0,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  phase_t       phase,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_rows
    logic [W-1:0] chain [DEPTH+1];
    assign chain[0] = d;
    for (genvar k = 0; k < DEPTH; k++) begin : g_row
      localparam int unsigned PH = (POS + k) % NUM_PHASES;
      always_ff @(posedge clk) begin
        if (!rst_n)         chain[k+1] <= '0;
        else if (phase[PH]) chain[k+1] <= chain[k];
      end
    end
    assign q = chain[DEPTH];
  end

endmodule
