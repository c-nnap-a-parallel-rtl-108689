// tb_sat_weight_addr: checks the weights address calculation on the worked
// example of a matrix at base 0x2000 with column length M: pointer 1 of
// column 0 gives 0x2001, pointer 6 gives 0x2006, and each new column adds M
// to the offset; then random bases, lengths and pointers.
module tb_sat_weight_addr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, next_col = 0;
  logic [15:0] base = '0, col_len = '0, ptr = '0, offset, addr;
  int checks = 0, failures = 0;

  sat_weight_addr dut (.*);

  task automatic expect_addr(logic [15:0] e, string what);
    checks++;
    if (addr !== e) begin failures++; $display("FAIL: %s: %h expected %h", what, addr, e); end
  endtask

  initial begin
    logic [15:0] off;
    repeat (2) @(negedge clk);
    rst_n = 1;
    base = 16'h2000; col_len = 16'd40; load = 1;
    @(negedge clk) load = 0;
    ptr = 1;  #1 expect_addr(16'h2001, "column 0 pointer 1");
    ptr = 6;  #1 expect_addr(16'h2006, "column 0 pointer 6");
    ptr = 8;  #1 expect_addr(16'h2008, "column 0 pointer 8");
    next_col = 1;
    @(negedge clk) next_col = 0;
    ptr = 1;  #1 expect_addr(16'h2000 + 40 + 1, "column 1 pointer 1");
    next_col = 1;
    @(negedge clk) next_col = 0;
    ptr = 0;  #1 expect_addr(16'h2000 + 80, "column 2 pointer 0");
    for (int n = 0; n < 200; n++) begin
      base = 16'($urandom); col_len = 16'($urandom % 4096); load = 1;
      @(negedge clk) load = 0;
      off = base;
      repeat (5) begin
        ptr = 16'($urandom % 4096);
        #1 expect_addr(off + ptr, "random");
        next_col = 1;
        @(negedge clk) next_col = 0;
        off = off + col_len;
      end
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
