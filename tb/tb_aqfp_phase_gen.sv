// tb_aqfp_phase_gen: checks the four-phase clock stand-in.
// After reset the one-hot phase vector must read 0001, then step through
// 0010, 0100, 1000 and wrap, one step per clk edge; a reset in mid-cycle
// must bring it back to phase 0.
module tb_aqfp_phase_gen;
  import aqfp_pkg::*;

  logic   clk;
  logic   rst_n;
  phase_t phase;
  int     checks = 0, failures = 0;

  aqfp_phase_gen dut (.clk, .rst_n, .phase);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_phase(input int unsigned k);
    checks++;
    if (phase !== phase_t'(1 << k)) begin
      failures++;
      $display("FAIL: phase=%b expected phase %0d", phase, k);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    expect_phase(0);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      expect_phase((t + 1) % NUM_PHASES);
    end
    // Reset again at phase 2.
    while (phase != 4'b0100) @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    expect_phase(0);
    rst_n = 1'b1;
    @(negedge clk);
    expect_phase(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
