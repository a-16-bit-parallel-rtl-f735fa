// tb_ksa_gray_cell: checks the gray prefix cell on every legal input
// (generate implies propagate). Expected g = gh | ph&gl. The cell sits at
// position 6, so it must change only on the phase-2 edge.
module tb_ksa_gray_cell;
  import aqfp_pkg::*;

  logic   clk;
  logic   rst_n;
  phase_t phase;
  logic   gh, ph, gl, g;
  int     checks = 0, failures = 0;

  ksa_gray_cell #(.POS(6)) dut (.clk, .rst_n, .phase, .gh, .ph, .gl, .g);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: gh=%b ph=%b gl=%b got %b expected %b", gh, ph, gl, got, exp);
    end
  endtask

  logic og;

  initial begin
    rst_n = 1'b0; phase = 4'b1111; {gh, ph, gl} = '1;
    @(negedge clk);
    check(g, 1'b0);
    rst_n = 1'b1;
    og = 1'b0;
    for (int rep = 0; rep < 3; rep++) begin
      for (int v = 0; v < 8; v++) begin
        {gh, ph, gl} = 3'(v);
        if (gh && !ph) continue;
        for (int k = 0; k < NUM_PHASES; k++) begin
          phase = phase_t'(1 << ((k + 3) % NUM_PHASES));
          @(negedge clk);
          if ((k + 3) % NUM_PHASES == 2) og = gh | (ph & gl);
          check(g, og);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
