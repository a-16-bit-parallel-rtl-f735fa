// tb_ksa16_aqfp: end-to-end test of the 16-bit AQFP Kogge-Stone adder at
// its default parameters.
//
// Operand streams, one pair per excitation cycle, back to back:
//   1. the five critical vectors: carry rippling through all 16 bits (both
//      operand orders), each operand passed through alone, carry generated
//      at every bit;
//   2. the measured random vectors (tb/ksa_table2_vectors.hex, one line per
//      vector: A, B and the recorded 17-bit result);
//   3. 110 further random vectors from $urandom, as many as the measured
//      random set holds, plus a few extra corner cases.
// Every expected result is a+b from an integer addition; the recorded
// results are also compared with a+b. The result of the pair sampled on
// edge S must appear on edge S+13 (14 clocked rows) and not earlier: at
// every edge the outputs are compared with the pair that must be visible
// then. Mechanism counters (full carry ripple, generate at every bit,
// operand pass-through, carry out 0 and 1, additions in flight at once,
// latency boundary seen) must each be non-zero.
module tb_ksa16_aqfp;
  import aqfp_pkg::*;

  localparam int unsigned W       = 16;
  localparam int unsigned STAGES  = adder_stages(W, 1'b1);
  localparam int unsigned N_T2    = 77;
  localparam int unsigned N_RAND  = 110;
  localparam int unsigned N_EXTRA = 4;
  localparam int unsigned NV      = 5 + N_T2 + N_RAND + N_EXTRA;

  logic         clk;
  logic         rst_n;
  logic [W-1:0] a, b, sum;
  logic         cout;
  phase_t       phase;

  logic [W-1:0] va [NV];
  logic [W-1:0] vb [NV];
  logic [W:0]   t2 [3*N_T2];
  int           sample_edge [NV];

  int checks = 0, failures = 0;
  int n_ripple = 0, n_gen_all = 0, n_pass = 0, n_cout1 = 0, n_cout0 = 0;
  int n_overlap = 0, n_latency = 0;

  ksa16_aqfp dut (.clk, .rst_n, .a, .b, .phase, .sum, .cout);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NV * NUM_PHASES + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string name, input logic [W:0] got, input logic [W:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", name, got, exp);
    end
  endtask

  function automatic logic [W:0] add(input int j);
    return (j < 0) ? '0 : {1'b0, va[j]} + {1'b0, vb[j]};
  endfunction

  task automatic count_mechanisms(input int j);
    logic [W-1:0] x = va[j], y = vb[j];
    logic [W:0]   s = add(j);
    if (x[0] & y[0] && (x[W-1:1] ^ y[W-1:1]) == '1) n_ripple++;
    if ((x & y) == '1) n_gen_all++;
    if (x == '0 || y == '0) n_pass++;
    if (s[W]) n_cout1++; else n_cout0++;
  endtask

  int issued, e, vis, in_flight;

  initial begin
    // Critical vectors.
    va[0] = 16'hFFFF; vb[0] = 16'h0001;
    va[1] = 16'h0001; vb[1] = 16'hFFFF;
    va[2] = 16'hFFFF; vb[2] = 16'h0000;
    va[3] = 16'h0000; vb[3] = 16'hFFFF;
    va[4] = 16'hFFFF; vb[4] = 16'hFFFF;
    // Measured random vectors.
    $readmemh("tb/ksa_table2_vectors.hex", t2);
    for (int j = 0; j < N_T2; j++) begin
      va[5+j] = t2[3*j][W-1:0];
      vb[5+j] = t2[3*j+1][W-1:0];
      check("recorded result", t2[3*j+2], {1'b0, va[5+j]} + {1'b0, vb[5+j]});
    end
    for (int j = 0; j < N_RAND; j++) begin
      va[5+N_T2+j] = W'($urandom);
      vb[5+N_T2+j] = W'($urandom);
    end
    va[NV-4] = 16'h8000; vb[NV-4] = 16'h8000;   // carry out from the top bit only
    va[NV-3] = 16'h7FFF; vb[NV-3] = 16'h0001;   // ripple stops below the top
    va[NV-2] = 16'h0000; vb[NV-2] = 16'h0000;
    va[NV-1] = 16'hAAAA; vb[NV-1] = 16'h5556;
    for (int j = 0; j < NV; j++) count_mechanisms(j);

    rst_n = 1'b0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    check("reset", {cout, sum}, '0);
    rst_n = 1'b1;
    issued = 0; e = 0;
    forever begin
      // Present the next pair before the edge that samples it (phase 0).
      if (phase[0] && issued < NV) begin
        a = va[issued]; b = vb[issued];
        sample_edge[issued] = e + 1;
        issued++;
      end
      @(posedge clk);
      e++;
      @(negedge clk);
      checks++;
      if (!$onehot(phase)) begin
        failures++;
        $display("FAIL phase not one-hot: %b", phase);
      end
      // Which pair's result must be showing after edge e?
      vis = -1; in_flight = 0;
      for (int j = 0; j < issued; j++) begin
        if (e >= sample_edge[j] + STAGES - 1) vis = j;
        else in_flight++;
      end
      check("result", {cout, sum}, add(vis));
      if (in_flight >= 3) n_overlap++;
      if (vis >= 0 && e == sample_edge[vis] + STAGES - 1 && add(vis) != add(vis - 1))
        n_latency++;   // the new result showed on the edge it was due, not before
      if (vis == NV - 1 && e == sample_edge[NV-1] + STAGES + 2) break;
    end

    if (n_ripple  == 0) begin failures++; $display("FAIL no full carry ripple"); end
    if (n_gen_all == 0) begin failures++; $display("FAIL no all-bit generate"); end
    if (n_pass    == 0) begin failures++; $display("FAIL no pass-through"); end
    if (n_cout1   == 0) begin failures++; $display("FAIL no carry out"); end
    if (n_cout0   == 0) begin failures++; $display("FAIL no result without carry out"); end
    if (n_overlap == 0) begin failures++; $display("FAIL never 3 additions in flight"); end
    if (n_latency == 0) begin failures++; $display("FAIL latency boundary never seen"); end
    $display("vectors=%0d ripple=%0d generate_all=%0d pass_through=%0d cout1=%0d cout0=%0d in_flight3=%0d latency_edges=%0d stages=%0d",
             NV, n_ripple, n_gen_all, n_pass, n_cout1, n_cout0, n_overlap, n_latency, STAGES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
