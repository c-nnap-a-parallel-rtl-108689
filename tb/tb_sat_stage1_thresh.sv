// tb_sat_stage1_thresh: L-max thresholding. First the worked example of
// ten summed values 54 23 5 54 12 5 8 9 2 54 with L = 3, which must store the
// class bit addresses 0, 3, 9 in one iteration. Then random summed values.
// The expected result is computed here in a different way from the RTL's
// passes: the threshold is the largest value t > 0 with at least L values
// >= t (or 1 if there is none), the class bits are all values >= t, listed
// by falling value and then rising index, and the iterations are the
// distinct values >= t. Cycles: 1 + iterations * (3*size + 6), plus
// size + 4 if the values run out before L bits are found.
module tb_sat_stage1_thresh;
  import sat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done, b_we;
  ctrl_t ctrl = '0;
  word_t tau, iters, b_wdata, b_rdata;
  addr_t b_addr;
  word_t bmem [65536];
  int checks = 0, failures = 0;
  int exhausted = 0, multi = 0;

  always_ff @(posedge clk) begin
    if (b_we) bmem[b_addr] <= b_wdata;
    b_rdata <= bmem[b_addr];
  end

  sat_stage1_thresh dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic run_and_check(string name);
    int unsigned cs, l, t, n_ge, exp_tau, exp_it, cyc, k;
    bit ran_out;
    int unsigned v [];
    cs = ctrl.class_size; l = ctrl.l_bits;
    v = new[cs];
    foreach (v[j]) v[j] = bmem[16'(ctrl.sv1_addr + j)];
    // threshold: the largest t > 0 with count(v >= t) >= L
    t = 0;
    for (int unsigned cand = 65535; cand >= 1 && l > 0; cand--) begin
      n_ge = 0;
      foreach (v[j]) if (v[j] >= cand) n_ge++;
      if (n_ge >= l) begin t = cand; break; end
      if (cand == 1) break;
    end
    ran_out = (l > 0) && (t == 0);
    if (ran_out) t = 1;
    exp_tau = 0; exp_it = 0;
    if (l > 0) for (int unsigned val = 65535; val >= t; val--) begin
      bit any = 0;
      foreach (v[j]) if (v[j] == val) begin any = 1; exp_tau++; end
      if (any) exp_it++;
      if (val == 0) break;
    end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(tau == word_t'(exp_tau), $sformatf("%s: tau %0d expected %0d", name, tau, exp_tau));
    check(iters == word_t'(exp_it), $sformatf("%s: iterations %0d expected %0d", name, iters, exp_it));
    check(cyc == 1 + exp_it * (3*cs + 6) + (ran_out ? cs + 4 : 0),
          $sformatf("%s: %0d cycles, expected %0d", name, cyc, 1 + exp_it * (3*cs + 6) + (ran_out ? cs + 4 : 0)));
    k = 0;
    if (l > 0) for (int unsigned val = 65535; val >= t; val--) begin
      foreach (v[j]) if (v[j] == val) begin
        check(bmem[16'(ctrl.cba_addr + k)] == 16'(j),
              $sformatf("%s: class bit address %0d = %0d expected %0d", name, k, bmem[16'(ctrl.cba_addr + k)], j));
        k++;
      end
      if (val == 0) break;
    end
    if (ran_out) exhausted++;
    if (exp_it > 1) multi++;
  endtask

  initial begin
    int unsigned fig [10] = '{54, 23, 5, 54, 12, 5, 8, 9, 2, 54};
    foreach (bmem[i]) bmem[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ctrl.sv1_addr = 16'h4000; ctrl.cba_addr = 16'h6000;
    ctrl.class_size = 10; ctrl.l_bits = 3;
    foreach (fig[j]) bmem[16'(16'h4000 + j)] = 16'(fig[j]);
    run_and_check("example");
    check(bmem[16'h6000] == 0 && bmem[16'h6001] == 3 && bmem[16'h6002] == 9 && tau == 3 && iters == 1,
          "example: class bit addresses 0, 3, 9");
    // L = 4 on the same values: 54s, then 23 in a second iteration
    ctrl.l_bits = 4;
    run_and_check("example L=4");
    // only two non-zero values and L = 5: the values run out
    ctrl.l_bits = 5;
    foreach (fig[j]) bmem[16'(16'h4000 + j)] = (j == 4 || j == 8) ? 16'(j) : 16'd0;
    run_and_check("run out");
    for (int n = 0; n < 20; n++) begin
      ctrl.class_size = 16'(1 + $urandom % 150);
      ctrl.l_bits = 16'($urandom % 12);
      for (int j = 0; j < 150; j++) bmem[16'(16'h4000 + j)] = 16'($urandom % ((n % 3 == 0) ? 3 : 40));
      run_and_check($sformatf("random %0d", n));
    end
    check(exhausted > 0, "values ran out before L bits at least once");
    check(multi > 0, "several iterations at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
