// tb_sat_ctrl_loader: random control blocks at random buffer addresses; every
// decoded field must equal the word written, and `done` must come
// CTRL_WORDS + 2 cycles after `start`.
module tb_sat_ctrl_loader;
  import sat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done;
  addr_t base = '0, b_addr;
  ctrl_t ctrl;
  word_t b_rdata;
  word_t bmem [65536];
  int checks = 0, failures = 0;

  always_ff @(posedge clk) b_rdata <= bmem[b_addr];

  sat_ctrl_loader dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (bmem[i]) bmem[i] = 16'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (30) begin
      word_t w [CTRL_WORDS];
      int unsigned cyc;
      base = 16'($urandom);
      foreach (w[i]) w[i] = bmem[16'(base + i)];
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc == CTRL_WORDS + 2, $sformatf("done after %0d cycles", cyc));
      check(ctrl.store_s2_sums == w[0][0] && ctrl.stop_after == stop_e'(w[0][2:1]), "flags");
      check(ctrl.n_tuples == w[1] && ctrl.col_len1 == w[2] && ctrl.w_off1 == w[3], "stage one matrix fields");
      check(ctrl.n_cols1 == w[4] && ctrl.class_size == w[5] && ctrl.l_bits == w[6], "class fields");
      check(ctrl.tp_addr == w[7] && ctrl.sv1_addr == w[8] && ctrl.cba_addr == w[9], "stage one addresses");
      check(ctrl.w_off2 == w[10] && ctrl.col_len2 == w[11] && ctrl.n_cols2 == w[12], "stage two matrix fields");
      check(ctrl.out_addr == w[13] && ctrl.sv2_addr == w[14], "stage two addresses");
      repeat ($urandom % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
