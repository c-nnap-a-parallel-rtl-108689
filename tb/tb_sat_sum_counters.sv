// tb_sat_sum_counters: random test of the summing counter bank against
// sixteen integer counters kept in the testbench, including clear having
// priority over count enable.
module tb_sat_sum_counters;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, en = 0;
  logic [15:0] weights = '0;
  logic [15:0][15:0] cnt;
  int unsigned model [16];
  int checks = 0, failures = 0;

  sat_sum_counters dut (.*);

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (cnt[i] != 16'(model[i])) begin
          failures++;
          if (failures < 5) $display("FAIL: counter %0d = %0d expected %0d", i, cnt[i], model[i]);
        end
      end
      clear   = ($urandom % 200) == 0;
      en      = ($urandom % 4) != 0;
      weights = 16'($urandom);
      if (clear) foreach (model[i]) model[i] = 0;
      else if (en) for (int i = 0; i < 16; i++) if (weights[i]) model[i]++;
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
