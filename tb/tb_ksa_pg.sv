// tb_ksa_pg: checks the pre-processing rows.
// A random operand pair is presented every excitation cycle (held for four
// edges from a phase-0 edge). With driver buffers, g = a&b and p = a|b must
// appear after the 2nd edge and the half sum a^b after the 4th; without
// them after the 1st and the 2nd. At every edge the outputs are compared
// with the pair that should be visible then, so late or early results fail.
module tb_ksa_pg;
  import aqfp_pkg::*;

  localparam int unsigned W  = 16;
  localparam int unsigned NV = 150;

  logic         clk;
  logic         rst_n;
  phase_t       phase;
  logic [W-1:0] a, b;
  logic [W-1:0] g1, p1, h1, g0, p0, h0;
  logic [W-1:0] va [NV];
  logic [W-1:0] vb [NV];
  int           checks = 0, failures = 0;

  ksa_pg #(.W(W), .POS(0), .DRIVER_BUF(1'b1)) u_buf   (.clk, .rst_n, .phase, .a, .b, .g(g1), .p(p1), .h(h1));
  ksa_pg #(.W(W), .POS(0), .DRIVER_BUF(1'b0)) u_nobuf (.clk, .rst_n, .phase, .a, .b, .g(g0), .p(p0), .h(h0));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Index of the operand pair whose result a path of n rows starting at
  // phase 0 shows after edge u (-1: none yet, outputs still reset).
  function automatic int visible(input int u, input int n);
    return (u - n + 1 < 0) ? -1 : (u - n + 1) / NUM_PHASES;
  endfunction

  task automatic check(input string name, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", name, got, exp);
    end
  endtask

  function automatic logic [W-1:0] op_and(input int j);
    return (j < 0) ? '0 : va[j] & vb[j];
  endfunction
  function automatic logic [W-1:0] op_or(input int j);
    return (j < 0) ? '0 : va[j] | vb[j];
  endfunction
  function automatic logic [W-1:0] op_xor(input int j);
    return (j < 0) ? '0 : va[j] ^ vb[j];
  endfunction

  initial begin
    for (int j = 0; j < NV; j++) begin
      va[j] = W'($urandom); vb[j] = W'($urandom);
    end
    va[0] = '1; vb[0] = '0; va[1] = '1; vb[1] = '1; va[2] = '0; vb[2] = '0;
    rst_n = 1'b0; phase = 4'b1111; a = '1; b = '1;
    @(negedge clk);
    rst_n = 1'b1;
    for (int u = 0; u < NV * NUM_PHASES; u++) begin
      if (u % NUM_PHASES == 0) begin a = va[u / NUM_PHASES]; b = vb[u / NUM_PHASES]; end
      phase = phase_t'(1 << (u % NUM_PHASES));
      @(negedge clk);
      check("g buf",   g1, op_and(visible(u, 2)));
      check("p buf",   p1, op_or (visible(u, 2)));
      check("h buf",   h1, op_xor(visible(u, 4)));
      check("g nobuf", g0, op_and(visible(u, 1)));
      check("p nobuf", p0, op_or (visible(u, 1)));
      check("h nobuf", h0, op_xor(visible(u, 2)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
