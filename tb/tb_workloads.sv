// tb_workloads: the recall sizes the SAT is evaluated on, run on the SAT
// processor with memory models here, each checked against the reference
// model and, for trained memories, against the stored output.
//   1. The small two-stage example: a 6-bit image tupled in pairs, an
//      11-bit class with bits 2 and 7 set, a 6-bit output. Stage one must
//      give two sums of 3 (one per tuple) and nine of 0, stage two three sums
//      of 2, and the recall the stored image.
//   2. A 22 x 22 image, tuple size 4, 32-bit class (L = 5), four stored pairs.
//   3. Class sizes 50, 100 and 150 with L = log2(class size) rounded up, tuple
//      size 4, one iteration expected, at the largest input sizes that fit a
//      16-bit word address (2048, 1024 and 768 bits).
// For each the cycle count is checked against this design's formula and
// must not exceed the published execution time equation:
//   cycles = a/16 (3.5 b/d + 34) + (r 2^s / 16)(3.5 t + 35) + i (4.5 a + 3 f)
// (a class size, b the stage one input size in bits, d and s the tuple
// sizes, t class bits set, i iterations, f matches per iteration). Here r
// is taken as the number of stage two tuples, so that r 2^s / 16 is the
// number of 16-line stage two columns, as in the stage one term.
module tb_workloads;
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
  word_t  bmem [65536];
  word_t  wmem [65536];

  always_ff @(posedge clk) begin
    if (b_we) bmem[b_addr] <= b_wdata;
    b_rdata <= bmem[b_addr];
    w_rdata <= wmem[w_addr];
  end

  sat_processor dut (.*);

  int checks = 0, failures = 0;
  adam_model m, r;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Run the workload in m; check memory, tau, iterations, recall and cycles.
  task automatic run(string name, int unsigned beta, int unsigned delta,
                     int unsigned rho, int unsigned sigma);
    int unsigned cyc, exp_cyc, bad, alpha, n_match;
    real eq1;
    r = new();
    r.b = m.b; r.w = m.w;
    r.run(0);
    foreach (bmem[i]) bmem[i] = m.b[i];
    foreach (wmem[i]) wmem[i] = m.w[i];
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!irq) begin @(negedge clk); cyc++; end
    exp_cyc = 22 + r.cyc_s1 + r.cyc_th + r.cyc_s2;
    bad = 0;
    foreach (bmem[i]) if (bmem[i] != r.b[i]) bad++;
    check(bad == 0, $sformatf("%s: %0d buffer words differ from the model", name, bad));
    check(tau == word_t'(r.tau) && iters == word_t'(r.iters), $sformatf("%s: tau/iterations", name));
    check(cyc == exp_cyc, $sformatf("%s: %0d cycles, expected %0d", name, cyc, exp_cyc));
    foreach (m.exp_out[c])
      check(int'(bmem[16'(adam_model::OUTA + c)]) == m.exp_out[c], $sformatf("%s: recalled column %0d", name, c));
    alpha = m.b[5];
    n_match = r.tau;
    eq1 = alpha / 16.0 * (3.5 * beta / delta + 34) + ((rho / sigma) * (2.0 ** sigma) / 16.0) * (3.5 * r.tau + 35)
          + r.iters * (4.5 * alpha + 3.0 * n_match / (r.iters == 0 ? 1 : r.iters));
    check(real'(cyc) <= eq1, $sformatf("%s: %0d cycles exceed the equation's %0.0f", name, cyc, eq1));
    $display("%s: tau %0d, iterations %0d, %0d cycles = %0.1f us at 20 MHz (equation: %0.0f cycles)",
             name, tau, iters, cyc, cyc * 0.05, eq1);
    @(negedge clk) irq_ack = 1;
    @(negedge clk) irq_ack = 0;
  endtask

  initial begin
    m = new();
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1: the two-stage example
    foreach (m.w[i]) m.w[i] = '0;
    foreach (m.b[i]) m.b[i] = '0;
    begin
      int unsigned lines [3] = '{2, 4 + 1, 8 + 3};   // image 10 01 11, tuples of 2
      foreach (lines[t]) begin
        m.w[lines[t]][2] = 1'b1;  m.w[lines[t]][7] = 1'b1;          // stage one, class bits 2, 7
        m.w[16'h0100 + 2][lines[t]] = 1'b1;                          // stage two, line of class bit 2
        m.w[16'h0100 + 7][lines[t]] = 1'b1;                          // and of class bit 7
        m.b[16'(adam_model::TP + t)] = 16'(lines[t]);
      end
      m.exp_out = new[1];
      m.exp_out[0] = (1 << 2) | (1 << 5) | (1 << 11);
      m.b[0] = 16'(2 << 1);  m.b[1] = 3;  m.b[2] = 12;  m.b[3] = 0;
      m.b[4] = 1;  m.b[5] = 11;  m.b[6] = 2;  m.b[7] = 16'(adam_model::TP);
      m.b[8] = 16'(adam_model::SV1);  m.b[9] = 16'(adam_model::CBA);
      m.b[10] = 16'h0100;  m.b[11] = 11;  m.b[12] = 1;
      m.b[13] = 16'(adam_model::OUTA);  m.b[14] = 16'(adam_model::SV2);
      m.b[0][0] = 1'b1;   // keep the stage two sums
    end
    run("two-stage example", 6, 2, 6, 2);
    begin
      int n3 = 0, n0 = 0, n2 = 0;
      for (int j = 0; j < 11; j++) begin
        if (bmem[16'(adam_model::SV1 + j)] == 3) n3++;
        if (bmem[16'(adam_model::SV1 + j)] == 0) n0++;
      end
      for (int j = 0; j < 12; j++) if (bmem[16'(adam_model::SV2 + j)] == 2) n2++;
      check(n3 == 2 && n0 == 9, "example: stage one sums are two 3s and nine 0s");
      check(bmem[16'(adam_model::CBA)] == 2 && bmem[16'(adam_model::CBA + 1)] == 7, "example: class bits 2 and 7");
      check(n2 == 3, "example: three stage two sums of 2");
    end

    // 2: 22 x 22 image, tuple 4, class 32
    m.build(484, 4, 32, 5, 484, 4, 4, 16'h0000, 0, 2);
    run("22x22 image, class 32", 484, 4, 484, 4);

    // 3: class sizes 50, 100, 150 at the largest inputs that fit
    m.build(2048, 4, 50, 6, 2048, 4, 4, 16'h0000, 0, 2);
    run("class 50, 2048-bit input", 2048, 4, 2048, 4);
    m.build(1024, 4, 100, 7, 1024, 4, 4, 16'h0000, 0, 2);
    run("class 100, 1024-bit input", 1024, 4, 1024, 4);
    m.build(768, 4, 150, 8, 768, 4, 4, 16'h0000, 0, 2);
    run("class 150, 768-bit input", 768, 4, 768, 4);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
