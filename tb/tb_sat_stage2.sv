// tb_sat_stage2: stage two summing and Willshaw thresholding with the shared
// counters and weights address unit and memory models here. A class bit
// address list of tau entries and random weights are set up; every output
// word must have bit i set exactly when tau of the addressed lines have bit i
// set, the summed values must be stored only when asked for, and start to
// done must take 2 + n_cols * (3*tau + 2 (+16 when storing)) cycles.
// Includes the worked example of two class bits (addresses 2 and 7) and
// tau = 0.
module tb_sat_stage2;
  import sat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done;
  ctrl_t ctrl = '0;
  word_t tau = '0;
  addr_t b_addr, w_addr, wa_base, wa_len, wa_offset;
  logic b_we, wa_load, wa_next, cnt_clr, cnt_en;
  word_t b_wdata, b_rdata, w_rdata;
  logic [NCNT-1:0][CNT_W-1:0] cnt;
  word_t bmem [65536];
  word_t wmem [65536];
  int checks = 0, failures = 0, stored = 0;

  always_ff @(posedge clk) begin
    if (b_we) bmem[b_addr] <= b_wdata;
    b_rdata <= bmem[b_addr];
    w_rdata <= wmem[w_addr];
  end

  sat_stage2 dut (.*);
  sat_sum_counters u_cnt (.clk, .rst_n, .clear (cnt_clr), .en (cnt_en), .weights (w_rdata), .cnt);
  sat_weight_addr u_wa (.clk, .rst_n, .load (wa_load), .base (wa_base), .next_col (wa_next),
                        .col_len (wa_len), .ptr (b_rdata), .offset (wa_offset), .addr (w_addr));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic run_and_check(string name);
    int unsigned cyc, exp_cyc;
    for (int i = 0; i < 16 * 32; i++) bmem[16'(ctrl.sv2_addr + i)] = 16'hDEAD;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    exp_cyc = 2 + ctrl.n_cols2 * (3 * tau + 2 + (ctrl.store_s2_sums ? 16 : 0));
    check(cyc == exp_cyc, $sformatf("%s: %0d cycles, expected %0d", name, cyc, exp_cyc));
    for (int unsigned c = 0; c < ctrl.n_cols2; c++) begin
      logic [15:0] o;
      for (int i = 0; i < 16; i++) begin
        int unsigned s = 0;
        for (int unsigned k = 0; k < tau; k++)
          s += wmem[16'(ctrl.w_off2 + c * ctrl.col_len2 + bmem[16'(ctrl.cba_addr + k)])][i];
        o[i] = (s == tau);
        if (ctrl.store_s2_sums)
          check(bmem[16'(ctrl.sv2_addr + 16*c + i)] == 16'(s), $sformatf("%s: stored sum %0d/%0d", name, c, i));
        else
          check(bmem[16'(ctrl.sv2_addr + 16*c + i)] == 16'hDEAD, $sformatf("%s: sum %0d/%0d not stored", name, c, i));
      end
      check(bmem[16'(ctrl.out_addr + c)] == o,
            $sformatf("%s: column %0d = %h expected %h", name, c, bmem[16'(ctrl.out_addr + c)], o));
    end
    if (ctrl.store_s2_sums) stored++;
  endtask

  initial begin
    foreach (wmem[i]) wmem[i] = 16'($urandom);
    foreach (bmem[i]) bmem[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ctrl.cba_addr = 16'h6000; ctrl.out_addr = 16'h7000; ctrl.sv2_addr = 16'h8000;
    // example: class bits 2 and 7 of an 11-bit class, one 16-line column
    ctrl.w_off2 = 16'h3000; ctrl.col_len2 = 11; ctrl.n_cols2 = 1; tau = 2;
    bmem[16'h6000] = 2; bmem[16'h6001] = 7;
    wmem[16'h3002] = 16'b0000_0100_1001_0010;
    wmem[16'h3007] = 16'b0000_0100_1010_0010;
    run_and_check("example");
    check(bmem[16'h7000] == 16'b0000_0100_1000_0010, "example: lines set by both class bits");
    for (int n = 0; n < 12; n++) begin
      ctrl.w_off2 = 16'($urandom); ctrl.col_len2 = 16'(20 + $urandom % 150);
      ctrl.n_cols2 = 16'(1 + $urandom % 20); ctrl.store_s2_sums = n[0];
      tau = (n == 3) ? 0 : 16'(1 + $urandom % 4);
      for (int k = 0; k < 8; k++) bmem[16'(16'h6000 + k)] = 16'($urandom % ctrl.col_len2);
      run_and_check($sformatf("random %0d", n));
    end
    check(stored > 0, "summed values stored at least once");
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
