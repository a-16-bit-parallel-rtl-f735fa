// tb_aqfp_maj3: checks the clocked majority-3 gate row.
// Three instances (plain, inverted b, inverted a and c) on different
// phases get random inputs every edge. A gate may change its output only on
// the edge of its own phase, and then to the majority of its (possibly
// inverted) inputs as they stood before that edge, computed here by
// counting ones.
module tb_aqfp_maj3;
  import aqfp_pkg::*;

  localparam int unsigned W = 8;

  logic         clk;
  logic         rst_n;
  phase_t       phase;
  logic [W-1:0] a, b, c;
  logic [W-1:0] y0, y1, y2;
  int           checks = 0, failures = 0;

  aqfp_maj3 #(.W(W), .POS(0))                           u0 (.clk, .rst_n, .phase, .a, .b, .c, .y(y0));
  aqfp_maj3 #(.W(W), .POS(2), .INV_B(1'b1))             u1 (.clk, .rst_n, .phase, .a, .b, .c, .y(y1));
  aqfp_maj3 #(.W(W), .POS(7), .INV_A(1'b1), .INV_C(1'b1)) u2 (.clk, .rst_n, .phase, .a, .b, .c, .y(y2));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] vote(input logic [W-1:0] x, y, z);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = (int'(x[i]) + int'(y[i]) + int'(z[i])) >= 2;
    return r;
  endfunction

  task automatic check(input string name, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", name, got, exp);
    end
  endtask

  logic [W-1:0] e0, e1, e2;

  initial begin
    rst_n = 1'b0; phase = '0; a = '0; b = '0; c = '0;
    @(negedge clk);
    phase = 4'b1111;
    @(negedge clk);
    check("reset0", y0, '0); check("reset1", y1, '0); check("reset2", y2, '0);
    rst_n = 1'b1;
    e0 = '0; e1 = '0; e2 = '0;
    for (int t = 0; t < 400; t++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      phase = phase_t'(1 << (t % NUM_PHASES));
      if (t % NUM_PHASES == 0) e0 = vote(a, b, c);
      if (t % NUM_PHASES == 2) e1 = vote(a, ~b, c);
      if (t % NUM_PHASES == 3) e2 = vote(~a, b, ~c);
      @(negedge clk);
      check("pos0", y0, e0); check("pos2 inv_b", y1, e1); check("pos7 inv_a_c", y2, e2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
