// tb_dsp_memory: random writes with byte enables and reads of the DSP
// memory, compared with a copy kept in the testbench; read latency one cycle.
module tb_dsp_memory;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [13:0] addr = '0;
  logic we = 0;
  logic [3:0] be = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [64];
  int checks = 0, failures = 0;

  dsp_memory dut (.*);

  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; be = 4'hF; addr = 14'(i * 200); wdata = 32'($urandom); model[i] = wdata;
    end
    repeat (500) begin
      int i = $urandom % 64;
      @(negedge clk);
      we = ($urandom % 2) == 1; be = 4'($urandom); addr = 14'(i * 200); wdata = 32'($urandom);
      if (we) for (int b = 0; b < 4; b++) if (be[b]) model[i][8*b +: 8] = wdata[8*b +: 8];
      @(negedge clk); we = 0;
      @(negedge clk);
      checks++;
      if (rdata != model[i]) begin failures++; $display("FAIL: word %0d = %h expected %h", i, rdata, model[i]); end
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
