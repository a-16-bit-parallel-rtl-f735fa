// tb_ksa_sum: checks the post-processing XOR rows.
// For random operand pairs the testbench forms the half sum a^b and the
// per-bit carries itself (from integer additions of the low bits) and
// feeds them in, one pair per excitation cycle. The 17-bit result must be
// a+b. The 16-bit block with driver buffers starts at position 9 (phase 1)
// and has 4 rows; a 4-bit block without them starts at position 0 and has
// 2. The result must appear on exactly the right edge.
module tb_ksa_sum;
  import aqfp_pkg::*;

  localparam int unsigned NV = 150;

  logic        clk;
  logic        rst_n;
  phase_t      phase;
  logic [15:0] a, b, h, g, s16;
  logic [3:0]  s4;
  logic        co16, co4;
  logic [15:0] va [NV];
  logic [15:0] vb [NV];
  int          checks = 0, failures = 0;

  ksa_sum #(.W(16), .POS(9), .DRIVER_BUF(1'b1)) u16 (
    .clk, .rst_n, .phase, .h, .g, .sum(s16), .cout(co16));
  ksa_sum #(.W(4), .POS(0), .DRIVER_BUF(1'b0)) u4 (
    .clk, .rst_n, .phase, .h(h[3:0]), .g(g[3:0]), .sum(s4), .cout(co4));

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

  function automatic logic [15:0] carries(input logic [15:0] x, input logic [15:0] y);
    logic [15:0] c;
    for (int i = 0; i < 16; i++) begin
      logic [16:0] mask = (17'd1 << (i + 1)) - 1;
      logic [16:0] s    = (17'(x) & mask) + (17'(y) & mask);
      c[i] = s[i+1];
    end
    return c;
  endfunction

  function automatic logic [16:0] total(input int j, input int bits);
    logic [16:0] m = (17'd1 << bits) - 1;
    return (j < 0) ? '0 : (17'(va[j]) & m) + (17'(vb[j]) & m);
  endfunction

  task automatic check(input string name, input logic [16:0] got, input logic [16:0] exp);
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
    va[0] = 16'hFFFF; vb[0] = 16'h0001;
    va[1] = 16'hFFFF; vb[1] = 16'hFFFF;
    va[2] = 16'h0000; vb[2] = 16'hFFFF;
    rst_n = 1'b0; phase = 4'b1111; a = '0; b = '0; h = '1; g = '1;
    @(negedge clk);
    rst_n = 1'b1;
    for (int u = 0; u < NV * NUM_PHASES; u++) begin
      if (u % NUM_PHASES == 0) begin
        a = va[u / NUM_PHASES]; b = vb[u / NUM_PHASES];
        h = a ^ b;
        g = carries(a, b);
      end
      phase = phase_t'(1 << (u % NUM_PHASES));
      @(negedge clk);
      check("w16", {co16, s16}, total(visible(u, 1, 4), 16));
      check("w4",  17'({co4, s4}), total(visible(u, 0, 2), 4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
