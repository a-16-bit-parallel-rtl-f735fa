// tb_ksa_black_cell: checks the black prefix cell on every legal input.
// Legal means a generate never exceeds its own propagate (g implies p), which
// the OR-form propagate of the adder guarantees. Expected values use the
// prefix operator with a carry-alive propagate: g = gh | ph&gl,
// p = gh | ph&pl. The cell sits at
// position 1 and must change only on the phase-1 edge.
module tb_ksa_black_cell;
  import aqfp_pkg::*;

  logic   clk;
  logic   rst_n;
  phase_t phase;
  logic   gh, ph, gl, pl, g, p;
  int     checks = 0, failures = 0;

  ksa_black_cell #(.POS(1)) dut (.clk, .rst_n, .phase, .gh, .ph, .gl, .pl, .g, .p);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string name, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: gh=%b ph=%b gl=%b pl=%b got %b expected %b",
               name, gh, ph, gl, pl, got, exp);
    end
  endtask

  logic eg, ep, og, op;

  initial begin
    rst_n = 1'b0; phase = 4'b1111; {gh, ph, gl, pl} = '1;
    @(negedge clk);
    check("reset g", g, 1'b0); check("reset p", p, 1'b0);
    rst_n = 1'b1;
    og = 1'b0; op = 1'b0;
    for (int rep = 0; rep < 3; rep++) begin
      for (int v = 0; v < 16; v++) begin
        {gh, ph, gl, pl} = 4'(v);
        if ((gh && !ph) || (gl && !pl)) continue;
        eg = gh | (ph & gl);
        ep = gh | (ph & pl);
        // Phases 0, 2, 3: hold. Phase 1: update.
        for (int k = 0; k < NUM_PHASES; k++) begin
          phase = phase_t'(1 << ((k + 2) % NUM_PHASES));
          @(negedge clk);
          if ((k + 2) % NUM_PHASES == 1) begin og = eg; op = ep; end
          check("g", g, og); check("p", p, op);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
