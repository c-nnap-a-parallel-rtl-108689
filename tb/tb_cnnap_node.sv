// tb_cnnap_node: end-to-end test of a C node at its default sizes.
//
// The testbench plays the DSP. It writes a trained ADAM memory and the
// tuple pointers of an image, with a control block, into the host-side
// areas of the weights and buffer memories over the 32-bit buses, swaps the
// areas over to the SAT, starts it and waits for the interrupt. While the
// SAT works on one recall the next one is loaded into the other areas (the
// node's double buffering); after each interrupt the areas are swapped back
// and the results are read over the host bus and compared with the
// reference model, as is the recalled output with the trained one and the
// cycle count with the state machines' formula. It also writes and reads
// the DSP memory. Every mechanism (area swap, loading during a recall,
// stored stage two sums, several thresholding iterations, ties, the two
// early stops) is counted and must have happened.
module tb_cnnap_node;
  import sat_pkg::*;
  import adam_ref_pkg::*;

  localparam int unsigned MEM_AW = sat_pkg::AW;
  localparam int unsigned ROWS   = 2 ** (MEM_AW - 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              w_swap = 0, b_swap = 0;
  logic [MEM_AW-2:0] w_addr = '0, b_addr = '0;
  logic              w_we = 0, b_we = 0;
  logic [31:0]       w_wdata = '0, b_wdata = '0, w_rdata, b_rdata;
  logic [13:0]       d_addr = '0;
  logic              d_we = 0;
  logic [3:0]        d_be = '0;
  logic [31:0]       d_wdata = '0, d_rdata;
  logic              sat_start = 0, sat_irq_ack = 0, sat_irq, sat_busy;
  addr_t             sat_ctrl_addr = '0;
  phase_e            sat_phase;
  word_t             sat_tau, sat_iters;

  cnnap_node dut (.*);

  int checks = 0, failures = 0;
  int n_swaps = 0, n_load_during = 0, n_multi = 0, n_ties = 0, n_store = 0, n_stop = 0;
  longint cycle = 0;
  longint irq_cycle = 0;
  logic   irq_q = 0;
  always @(posedge clk) begin
    cycle++;
    irq_q <= sat_irq;
    if (sat_irq && !irq_q) irq_cycle = cycle;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Load a model's areas into the host-side areas, one 32-bit word a cycle.
  task automatic load(adam_model m);
    for (int unsigned r = 0; r < ROWS; r++) begin
      @(negedge clk);
      w_we = 1; w_addr = (MEM_AW-1)'(r); w_wdata = {m.w[2*r+1], m.w[2*r]};
      b_we = 1; b_addr = (MEM_AW-1)'(r); b_wdata = {m.b[2*r+1], m.b[2*r]};
      if (sat_busy) n_load_during++;
    end
    @(negedge clk); w_we = 0; b_we = 0;
  endtask

  // Read the host-side buffer area and compare with the model's result.
  task automatic compare(adam_model r, string name);
    int unsigned bad = 0;
    for (int unsigned row = 0; row < ROWS; row++) begin
      @(negedge clk); b_addr = (MEM_AW-1)'(row);
      @(negedge clk);
      if (b_rdata != {r.b[2*row+1], r.b[2*row]}) begin
        if (bad < 4) $display("  %s: row %h = %h expected %h", name, row, b_rdata, {r.b[2*row+1], r.b[2*row]});
        bad++;
      end
    end
    check(bad == 0, $sformatf("%s: buffer memory after recall (%0d rows differ)", name, bad));
  endtask

  task automatic swap_areas();
    @(negedge clk); w_swap = ~w_swap; b_swap = ~b_swap; n_swaps++;
  endtask

  task automatic start_sat();
    @(negedge clk); sat_start = 1;
    @(negedge clk); sat_start = 0;
  endtask

  // Wait for the interrupt, returning the cycles from the clock edge before
  // the start pulse to the edge that raised it; acknowledge it.
  task automatic wait_irq(longint t0, output longint cyc);
    while (!sat_irq) @(negedge clk);
    cyc = irq_cycle - t0;
    @(negedge clk) sat_irq_ack = 1;
    @(negedge clk) sat_irq_ack = 0;
  endtask

  function automatic longint expected_cycles(adam_model r, int unsigned stop);
    longint e = 20 + r.cyc_s1;
    if (stop >= 1) e += 1 + r.cyc_th;
    if (stop >= 2) e += 1 + r.cyc_s2;
    return e;
  endfunction

  adam_model job [4];
  adam_model res [4];
  int unsigned stops [4] = '{2, 2, 1, 0};

  initial begin
    longint t0, cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // four recalls: trained memories (second with stored stage two sums),
    // random weights stopped after thresholding, and a stage-one-only run
    foreach (job[j]) job[j] = new();
    job[0].build(256, 4, 50, 6, 64, 4, 5, 16'h2000, 0, stops[0]);
    job[1].build(128, 4, 100, 7, 64, 4, 8, 16'h0000, 1, stops[1]);
    job[2].build(96, 4, 48, 10, 32, 4, 1, 16'h0000, 0, stops[2]);
    for (int unsigned i = 0; i < 16'h2000; i++) job[2].w[i] = 16'($urandom);
    // in job 2, class bits 0-5 reach every line (sum 24, the tuple count)
    // and bits 6-11 every line but those of tuple 0 (sum 23): with L = 10
    // thresholding needs two iterations and the second brings 12 > L bits
    for (int unsigned i = 0; i < 384; i++) begin
      job[2].w[i] |= 16'h0FFF;
      if (i < 16) job[2].w[i] &= ~16'h0FC0;
    end
    job[3].build(64, 4, 40, 5, 32, 4, 3, 16'h0000, 0, stops[3]);
    foreach (job[j]) begin
      res[j] = new();
      res[j].b = job[j].b;
      res[j].w = job[j].w;
      res[j].run(0);
    end

    // DSP memory
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); d_we = 1; d_be = 4'hF; d_addr = 14'(i * 37); d_wdata = 32'hA5A5_0000 + i;
    end
    @(negedge clk); d_we = 1; d_be = 4'b0010; d_addr = 0; d_wdata = 32'h0000_7700;
    @(negedge clk); d_we = 0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); d_addr = 14'(i * 37);
      @(negedge clk);
      check(d_rdata == ((i == 0) ? 32'hA5A5_7700 : 32'hA5A5_0000 + i),
            $sformatf("DSP memory word %0d = %h", i, d_rdata));
    end

    load(job[0]);
    for (int j = 0; j < 4; j++) begin
      swap_areas();                  // job j to the SAT, results of j-1 to the host
      t0 = cycle;
      start_sat();
      if (j > 0) compare(res[j-1], $sformatf("job %0d", j - 1));
      if (j < 3) load(job[j+1]);     // next job while the SAT works
      wait_irq(t0, cyc);
      check(cyc == expected_cycles(res[j], stops[j]) + 2,
            $sformatf("job %0d: %0d cycles to interrupt, expected %0d", j, cyc,
                      expected_cycles(res[j], stops[j]) + 2));
      if (stops[j] >= 1) begin
        check(sat_tau == word_t'(res[j].tau), $sformatf("job %0d: tau %0d expected %0d", j, sat_tau, res[j].tau));
        check(sat_iters == word_t'(res[j].iters), $sformatf("job %0d: iters %0d", j, sat_iters));
        if (res[j].iters > 1) n_multi++;
        if (res[j].tau > job[j].b[6]) n_ties++;
      end else n_stop++;
      if (stops[j] == 1) n_stop++;
      if (stops[j] == 2 && job[j].b[0][0]) n_store++;
      if (stops[j] == 2)
        foreach (job[j].exp_out[c])
          check(int'(res[j].b[16'(adam_model::OUTA + c)]) == job[j].exp_out[c],
                $sformatf("job %0d: recalled column %0d differs from the trained output", j, c));
    end
    swap_areas();
    compare(res[3], "job 3");

    check(n_swaps >= 5, "areas swapped");
    check(n_load_during > 0, "next job loaded while the SAT was busy");
    check(n_multi > 0, "several thresholding iterations");
    check(n_ties > 0, "ties beyond L");
    check(n_store > 0, "stage two sums stored");
    check(n_stop >= 2, "both early stops");
    $display("swaps %0d, host writes during recall %0d, multi-iteration %0d, ties %0d, store %0d, early stops %0d",
             n_swaps, n_load_during, n_multi, n_ties, n_store, n_stop);
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
