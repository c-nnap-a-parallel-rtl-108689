// tb_sat_processor: self-checking test of the SAT processor on its own.
//
// The buffer and weights memories are modelled here as word arrays with one
// cycle of read latency. Each scenario builds a workload in the reference
// model (adam_ref_pkg), copies it into the memories, starts the SAT and waits
// for the interrupt. It then compares the whole buffer memory, tau and the
// iteration count with the model, and the cycles from start to interrupt
// with the state machines' cycle formula. Scenarios: trained ADAM memories
// (recall must also return the trained output), random weights (many
// thresholding iterations and ties), the three stop points, stored stage two
// sums and L = 0.
module tb_sat_processor;
  import sat_pkg::*;
  import adam_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   start = 0, irq_ack = 0, irq, busy;
  addr_t  ctrl_addr = '0;
  phase_e phase;
  word_t  tau, iters;
  addr_t  b_addr, w_addr;
  logic   b_we;
  word_t  b_wdata, b_rdata, w_rdata;

  word_t bmem [65536];
  word_t wmem [65536];

  always_ff @(posedge clk) begin
    if (b_we) bmem[b_addr] <= b_wdata;
    b_rdata <= bmem[b_addr];
    w_rdata <= wmem[w_addr];
  end

  sat_processor dut (.*);

  int checks = 0, failures = 0;
  int n_multi_iter = 0, n_ties = 0, n_tail = 0, n_store = 0, n_stop1 = 0, n_stop2 = 0;
  adam_model m;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_case(string name, bit check_recall);
    int unsigned cyc, exp_cyc, stop, bad;
    adam_model ref_m;
    foreach (bmem[i]) bmem[i] = m.b[i];
    foreach (wmem[i]) wmem[i] = m.w[i];
    stop = (m.b[0] >> 1) & 3;
    ref_m = new();
    ref_m.b = m.b;
    ref_m.w = m.w;
    ref_m.run(0);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!irq) begin @(negedge clk); cyc++; end
    exp_cyc = 20 + ref_m.cyc_s1;
    if (stop >= 1) exp_cyc += 1 + ref_m.cyc_th;
    if (stop >= 2) exp_cyc += 1 + ref_m.cyc_s2;
    bad = 0;
    foreach (bmem[i]) if (bmem[i] != ref_m.b[i]) begin
      if (bad < 4) $display("  %s: buffer[%h] = %h, expected %h", name, i, bmem[i], ref_m.b[i]);
      bad++;
    end
    check(bad == 0, $sformatf("%s: buffer memory contents (%0d words differ)", name, bad));
    check(cyc == exp_cyc, $sformatf("%s: %0d cycles to interrupt, expected %0d", name, cyc, exp_cyc));
    if (stop >= 1) begin
      check(tau == word_t'(ref_m.tau), $sformatf("%s: tau %0d expected %0d", name, tau, ref_m.tau));
      check(iters == word_t'(ref_m.iters), $sformatf("%s: iters %0d expected %0d", name, iters, ref_m.iters));
      if (ref_m.iters > 1) n_multi_iter++;
      if (ref_m.tau > m.b[6]) n_ties++;
      if (ref_m.thr_tail > 0) n_tail++;
    end
    if (stop == 0) n_stop1++;
    if (stop == 1) n_stop2++;
    if (stop == 2 && m.b[0][0]) n_store++;
    if (check_recall)
      foreach (m.exp_out[c])
        check(int'(bmem[16'(adam_model::OUTA + c)]) == m.exp_out[c],
              $sformatf("%s: recalled column %0d = %h, trained %h", name, c,
                        bmem[16'(adam_model::OUTA + c)], m.exp_out[c]));
    check(irq && !busy, $sformatf("%s: interrupt raised and SAT idle", name));
    @(negedge clk) irq_ack = 1;
    @(negedge clk) irq_ack = 0;
    check(!irq, $sformatf("%s: interrupt cleared by acknowledge", name));
  endtask

  // Random weights and pointers: summed values spread, so L-max needs
  // several iterations and meets ties.
  task automatic randomize_weights(int unsigned words);
    for (int unsigned i = 0; i < words; i++) m.w[i] = 16'($urandom);
  endtask

  initial begin
    m = new();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1: trained memory, full recall (small): 32-bit image, tuple 4, class 20, L 4
    m.build(32, 4, 20, 4, 32, 4, 3, 16'h2000, 0, 2);
    run_case("trained-small", 1);
    // 2: trained memory, stage two sums stored, class 50 / L 6, tuple 4
    m.build(64, 4, 50, 6, 48, 4, 4, 16'h0000, 1, 2);
    run_case("trained-store", 1);
    // 3: random weights, class 40, L 9: many iterations and ties
    m.build(48, 4, 40, 9, 32, 4, 1, 16'h0000, 0, 2);
    randomize_weights(16'h2000);
    run_case("random-lmax", 0);
    // 4: random weights with tuple 2 and L larger than the class size
    m.build(24, 2, 16, 20, 16, 2, 1, 16'h0100, 1, 2);
    randomize_weights(16'h1000);
    run_case("random-all-bits", 0);
    // 5: stop after stage one summing
    m.build(40, 4, 33, 5, 16, 4, 2, 16'h0000, 0, 0);
    run_case("stop-s1sum", 0);
    // 6: stop after thresholding
    m.build(40, 4, 33, 5, 16, 4, 2, 16'h0000, 0, 1);
    randomize_weights(16'h1000);
    run_case("stop-s1thr", 0);
    // 7: L = 0 (no class bits, every output bit set by Willshaw)
    m.build(16, 4, 16, 0, 16, 4, 1, 16'h0000, 0, 2);
    m.b[6] = 0;
    run_case("l-zero", 0);
    // mechanisms exercised
    check(n_multi_iter > 0, "several thresholding iterations happened");
    check(n_ties > 0, "ties gave more than L class bits");
    check(n_tail > 0, "thresholding ran out of non-zero values");
    check(n_store > 0, "stage two summed values were stored");
    check(n_stop1 > 0 && n_stop2 > 0, "both early stops happened");
    $display("multi-iteration %0d, ties %0d, exhausted %0d, store %0d, stop-s1 %0d, stop-thr %0d",
             n_multi_iter, n_ties, n_tail, n_store, n_stop1, n_stop2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
