// tb_aqfp_buffer: checks buffer chains.
// A new random word is presented every excitation cycle, at phase 0. A
// three-row chain starting at phase 1 must deliver it exactly after the
// phase-3 edge (three phases later) and show the previous word one edge
// before; a one-row chain at phase 0 must deliver it on the phase-0 edge;
// a zero-row chain is a wire.
module tb_aqfp_buffer;
  import aqfp_pkg::*;

  localparam int unsigned W = 12;

  logic         clk;
  logic         rst_n;
  phase_t       phase;
  logic [W-1:0] d, q3, q1, q0;
  int           checks = 0, failures = 0;

  aqfp_buffer #(.W(W), .POS(1), .DEPTH(3)) u3 (.clk, .rst_n, .phase, .d, .q(q3));
  aqfp_buffer #(.W(W), .POS(4), .DEPTH(1)) u1 (.clk, .rst_n, .phase, .d, .q(q1));
  aqfp_buffer #(.W(W), .POS(0), .DEPTH(0)) u0 (.clk, .rst_n, .phase, .d, .q(q0));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string name, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", name, got, exp);
    end
  endtask

  logic [W-1:0] cur, prev;

  initial begin
    rst_n = 1'b0; phase = 4'b1111; d = '1;
    @(negedge clk);
    check("reset", q3, '0);
    rst_n = 1'b1;
    prev = '0; cur = '0;
    for (int t = 0; t < 400; t++) begin
      if (t % NUM_PHASES == 0) begin
        prev = cur;
        cur  = W'($urandom);
        d    = cur;
      end
      phase = phase_t'(1 << (t % NUM_PHASES));
      @(negedge clk);
      check("wire", q0, d);
      if (t >= NUM_PHASES) begin
        // Edge of phase k just happened with k = t mod 4.
        case (t % NUM_PHASES)
          0: begin check("depth1", q1, cur); check("depth3 old", q3, prev); end
          2: check("depth3 early", q3, prev);
          3: begin check("depth3", q3, cur); check("depth1 hold", q1, cur); end
          default: check("depth1 hold", q1, cur);
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
