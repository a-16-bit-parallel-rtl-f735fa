// tb_ksa_prefix_tree: checks the Kogge-Stone carry tree.
// Inputs are the generate/propagate pair of a random operand pair, g = a&b
// and p = a|b, one pair per excitation cycle. Output bit i must be the carry
// out of bit i of a+b, taken here from an integer addition of the low i+1
// bits. The 16-bit tree with driver buffers starts at position 1 and has
// 8 rows; an 8-bit tree without them starts at position 0 and has 3. The
// result must appear on exactly the right edge.
module tb_ksa_prefix_tree;
  import aqfp_pkg::*;

  localparam int unsigned NV = 150;

  logic        clk;
  logic        rst_n;
  phase_t      phase;
  logic [15:0] a, b, c16;
  logic [7:0]  c8;
  logic [15:0] va [NV];
  logic [15:0] vb [NV];
  int          checks = 0, failures = 0;

  ksa_prefix_tree #(.W(16), .POS(1), .DRIVER_BUF(1'b1)) u16 (
    .clk, .rst_n, .phase, .g_in(a & b), .p_in(a | b), .g_out(c16));
  ksa_prefix_tree #(.W(8), .POS(0), .DRIVER_BUF(1'b0)) u8 (
    .clk, .rst_n, .phase, .g_in(a[7:0] & b[7:0]), .p_in(a[7:0] | b[7:0]), .g_out(c8));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int visible(input int u, input int first_phase, input int n);
    int e = u - first_phase - n + 1;
    return (e < 0) ? -1 : e / NUM_PHASES;
  endfunction

  function automatic logic [15:0] carries(input int j);
    logic [15:0] c;
    if (j < 0) return '0;
    for (int i = 0; i < 16; i++) begin
      logic [16:0] mask = (17'd1 << (i + 1)) - 1;
      logic [16:0] s    = (17'(va[j]) & mask) + (17'(vb[j]) & mask);
      c[i] = s[i+1];
    end
    return c;
  endfunction

  task automatic check(input string name, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", name, got, exp);
    end
  endtask

  initial begin
    for (int j = 0; j < NV; j++) begin
      va[j] = 16'($urandom); vb[j] = 16'($urandom);
    end
    va[0] = 16'hFFFF; vb[0] = 16'h0001;   // ripple through every bit
    va[1] = 16'h00FF; vb[1] = 16'h0001;   // ripple through the 8-bit tree
    va[2] = 16'hFFFF; vb[2] = 16'hFFFF;   // generate everywhere
    va[3] = 16'h7FFF; vb[3] = 16'h0001;   // stops one bit short of the top
    rst_n = 1'b0; phase = 4'b1111; a = '1; b = '1;
    @(negedge clk);
    rst_n = 1'b1;
    for (int u = 0; u < NV * NUM_PHASES; u++) begin
      if (u % NUM_PHASES == 0) begin a = va[u / NUM_PHASES]; b = vb[u / NUM_PHASES]; end
      phase = phase_t'(1 << (u % NUM_PHASES));
      @(negedge clk);
      check("w16", c16, carries(visible(u, 1, 8)));
      check("w8",  {8'h00, c8}, {8'h00, carries(visible(u, 0, 3)) & 16'h00FF});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
