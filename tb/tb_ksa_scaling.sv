// tb_ksa_scaling: the adder scaled to wider words.
//
// Instances at 32, 64 and 128 bits with a driver buffer after every gate
// row, and a 64-bit one without, all run in lock step from one reset. Each
// receives a stream of random operand pairs, one per excitation cycle,
// starting with a carry that ripples through the whole word. Each must
// produce a+b exactly (log2(W) + 3) * stride - 1 edges after sampling, so
// the latency grows by one gate row (two clocked rows with driver buffers)
// per doubling of the word. A testbench-side wide integer addition gives
// the expected values.
module tb_ksa_scaling;
  import aqfp_pkg::*;

  localparam int unsigned NV   = 60;
  localparam int unsigned WMAX = 128;

  logic            clk;
  logic            rst_n;
  logic [WMAX-1:0] a, b;
  phase_t          ph32, ph64, ph128, ph64n;
  logic [31:0]     s32;
  logic [63:0]     s64, s64n;
  logic [127:0]    s128;
  logic            c32, c64, c64n, c128;

  logic [WMAX-1:0] va [NV];
  logic [WMAX-1:0] vb [NV];

  int checks = 0, failures = 0;

  ksa16_aqfp #(.W(32))  u32  (.clk, .rst_n, .a(a[31:0]), .b(b[31:0]), .phase(ph32),  .sum(s32),  .cout(c32));
  ksa16_aqfp #(.W(64))  u64  (.clk, .rst_n, .a(a[63:0]), .b(b[63:0]), .phase(ph64),  .sum(s64),  .cout(c64));
  ksa16_aqfp #(.W(128)) u128 (.clk, .rst_n, .a(a),       .b(b),       .phase(ph128), .sum(s128), .cout(c128));
  ksa16_aqfp #(.W(64), .DRIVER_BUF(1'b0)) u64n (
    .clk, .rst_n, .a(a[63:0]), .b(b[63:0]), .phase(ph64n), .sum(s64n), .cout(c64n));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NV * NUM_PHASES + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected (W+1)-bit result visible after edge e for a W-bit adder whose
  // pipeline has `stages` rows; pair j is sampled on edge 4*j + 1.
  function automatic logic [WMAX:0] expect_sum(input int e, input int w, input int stages);
    int j = (e - 1 - (stages - 1));
    logic [WMAX:0] m = ((WMAX+1)'(1) << w) - 1;
    if (j < 0) return '0;
    j = j / NUM_PHASES;
    if (j >= NV) j = NV - 1;
    return ({1'b0, va[j]} & m) + ({1'b0, vb[j]} & m);
  endfunction

  task automatic check(input string name, input logic [WMAX:0] got, input logic [WMAX:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", name, got, exp);
    end
  endtask

  initial begin
    for (int j = 0; j < NV; j++)
      for (int k = 0; k < WMAX / 32; k++) begin
        va[j][32*k +: 32] = $urandom;
        vb[j][32*k +: 32] = $urandom;
      end
    va[0] = '1; vb[0] = 1;
    va[1] = '1; vb[1] = '1;
    rst_n = 1'b0; a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int e = 1; e <= NV * NUM_PHASES + 24; e++) begin
      // Edge e samples operands when e = 1 mod 4 (phase 0 after reset).
      if ((e - 1) % NUM_PHASES == 0 && (e - 1) / NUM_PHASES < NV) begin
        a = va[(e - 1) / NUM_PHASES]; b = vb[(e - 1) / NUM_PHASES];
      end
      @(negedge clk);
      check("w32",       (WMAX+1)'({c32, s32}),   expect_sum(e, 32,  adder_stages(32, 1'b1)));
      check("w64",       (WMAX+1)'({c64, s64}),   expect_sum(e, 64,  adder_stages(64, 1'b1)));
      check("w128",      {c128, s128},            expect_sum(e, 128, adder_stages(128, 1'b1)));
      check("w64 nobuf", (WMAX+1)'({c64n, s64n}), expect_sum(e, 64,  adder_stages(64, 1'b0)));
      checks++;
      if (ph32 != ph128 || ph64 != ph64n) begin
        failures++;
        $display("FAIL phases out of step");
      end
    end
    $display("stages: w32=%0d w64=%0d w128=%0d w64_nobuf=%0d",
             adder_stages(32, 1'b1), adder_stages(64, 1'b1),
             adder_stages(128, 1'b1), adder_stages(64, 1'b0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
