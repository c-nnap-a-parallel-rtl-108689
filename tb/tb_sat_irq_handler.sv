// tb_sat_irq_handler: the stage sequence. A model of the four stages answers
// each start pulse with a done pulse after a random delay; the handler must
// start loader, stage one summing, thresholding and stage two in that order,
// stop after the stage stop_after names, raise the interrupt one cycle after
// the last done, hold it until acknowledged and report busy and the phase.
module tb_sat_irq_handler;
  import sat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, irq_ack = 0;
  stop_e stop_after = STOP_FULL;
  logic ld_done = 0, s1_done = 0, th_done = 0, s2_done = 0;
  logic ld_start, s1_start, th_start, s2_start, busy, irq;
  phase_e phase;
  int checks = 0, failures = 0;
  int order [$];

  sat_irq_handler dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // stage models: record the start, answer with done after a delay
  // (sampled mid-cycle, away from the clock edge)
  always @(negedge clk) begin
    if (ld_start) fork begin order.push_back(0); check(phase == PH_LOAD, "phase during load");
      repeat (1 + $urandom % 5) @(negedge clk); ld_done = 1; @(negedge clk); ld_done = 0; end join_none
    if (s1_start) fork begin order.push_back(1); check(phase == PH_S1SUM, "phase during stage one sum");
      repeat (1 + $urandom % 5) @(negedge clk); s1_done = 1; @(negedge clk); s1_done = 0; end join_none
    if (th_start) fork begin order.push_back(2); check(phase == PH_S1THR, "phase during threshold");
      repeat (1 + $urandom % 5) @(negedge clk); th_done = 1; @(negedge clk); th_done = 0; end join_none
    if (s2_start) fork begin order.push_back(3); check(phase == PH_S2, "phase during stage two");
      repeat (1 + $urandom % 5) @(negedge clk); s2_done = 1; @(negedge clk); s2_done = 0; end join_none
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 12; n++) begin
      int exp_n;
      stop_after = stop_e'(n % 3);
      exp_n = (n % 3) + 2;
      order.delete();
      check(!busy && !irq, "idle before start");
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      check(busy, "busy after start");
      while (!irq) @(negedge clk);
      check(order.size() == exp_n, $sformatf("run %0d: %0d stages started, expected %0d", n, order.size(), exp_n));
      foreach (order[i]) check(order[i] == i, $sformatf("run %0d: stage order", n));
      check(!busy, "not busy when interrupting");
      repeat (3) @(negedge clk);
      check(irq, "interrupt held until acknowledged");
      irq_ack = 1;
      @(negedge clk) irq_ack = 0;
      check(!irq, "interrupt cleared");
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
