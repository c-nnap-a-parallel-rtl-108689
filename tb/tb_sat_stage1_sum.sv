// tb_sat_stage1_sum: stage one summing with the shared counters and weights
// address unit around it and memory models here. Checks the worked example
// of a matrix at 0x2000 summed on lines 1, 6 and 8, then random matrices and
// pointer lists: every stored summed value against sums computed here, and
// the cycle count 2 + n_cols * (3 * n_tuples + 17) from start to done.
module tb_sat_stage1_sum;
  import sat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done;
  ctrl_t ctrl = '0;
  addr_t b_addr, w_addr, wa_base, wa_len, wa_offset;
  logic b_we, wa_load, wa_next, cnt_clr, cnt_en;
  word_t b_wdata, b_rdata, w_rdata;
  logic [NCNT-1:0][CNT_W-1:0] cnt;
  word_t bmem [65536];
  word_t wmem [65536];
  int checks = 0, failures = 0;

  always_ff @(posedge clk) begin
    if (b_we) bmem[b_addr] <= b_wdata;
    b_rdata <= bmem[b_addr];
    w_rdata <= wmem[w_addr];
  end

  sat_stage1_sum dut (.*);
  sat_sum_counters u_cnt (.clk, .rst_n, .clear (cnt_clr), .en (cnt_en), .weights (w_rdata), .cnt);
  sat_weight_addr u_wa (.clk, .rst_n, .load (wa_load), .base (wa_base), .next_col (wa_next),
                        .col_len (wa_len), .ptr (b_rdata), .offset (wa_offset), .addr (w_addr));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic run_and_check(string name);
    int unsigned cyc = 0, bad = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 2 + ctrl.n_cols1 * (3 * ctrl.n_tuples + 17),
          $sformatf("%s: %0d cycles, expected %0d", name, cyc, 2 + ctrl.n_cols1 * (3 * ctrl.n_tuples + 17)));
    @(negedge clk);
    for (int unsigned c = 0; c < ctrl.n_cols1; c++)
      for (int i = 0; i < 16; i++) begin
        int unsigned s = 0;
        for (int unsigned t = 0; t < ctrl.n_tuples; t++)
          s += wmem[16'(ctrl.w_off1 + c * ctrl.col_len1 + bmem[16'(ctrl.tp_addr + t)])][i];
        check(bmem[16'(ctrl.sv1_addr + 16*c + i)] == 16'(s),
              $sformatf("%s: column %0d value %0d = %0d expected %0d", name, c, i,
                        bmem[16'(ctrl.sv1_addr + 16*c + i)], s));
      end
  endtask

  initial begin
    foreach (wmem[i]) wmem[i] = 16'($urandom);
    foreach (bmem[i]) bmem[i] = 16'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // worked example: offset 0x2000, pointers 1, 6, 8; column length 12
    ctrl.w_off1 = 16'h2000; ctrl.col_len1 = 12; ctrl.n_cols1 = 3; ctrl.n_tuples = 3;
    ctrl.tp_addr = 16'h0100; ctrl.sv1_addr = 16'h4000;
    bmem[16'h0100] = 1; bmem[16'h0101] = 6; bmem[16'h0102] = 8;
    wmem[16'h2001] = 16'h0001; wmem[16'h2006] = 16'h0003; wmem[16'h2008] = 16'h8007;
    run_and_check("example");
    check(bmem[16'h4000] == 3 && bmem[16'h4001] == 2 && bmem[16'h4002] == 1 &&
          bmem[16'h4003] == 0 && bmem[16'h400F] == 1, "example: sums of lines 1, 6, 8 of column 0");
    for (int n = 0; n < 6; n++) begin
      ctrl.w_off1 = 16'($urandom); ctrl.col_len1 = 16'(16 + $urandom % 500);
      ctrl.n_cols1 = 16'(1 + $urandom % 8); ctrl.n_tuples = 16'($urandom % 60);
      ctrl.tp_addr = 16'h0200; ctrl.sv1_addr = 16'h5000;
      for (int t = 0; t < 60; t++) bmem[16'(16'h0200 + t)] = 16'($urandom % ctrl.col_len1);
      run_and_check($sformatf("random %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
