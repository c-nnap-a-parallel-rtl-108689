// tb_weights_memory: the DSP fills the host-side area with 32-bit words,
// swaps, and the SAT side must read them as 16-bit words (low half at the
// even address). Meanwhile the host fills the other area, which the SAT side
// must not see until the next swap. Small areas (AW = 8) keep it short.
module tb_weights_memory;
  localparam int AW = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic swap = 0;
  logic [AW-2:0] h_addr = '0;
  logic h_we = 0;
  logic [31:0] h_wdata = '0, h_rdata;
  logic [AW-1:0] s_addr = '0;
  logic [15:0] s_rdata;
  logic [31:0] area [2][2**(AW-1)];
  int checks = 0, failures = 0;

  weights_memory #(.AW(AW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // area 0 from the host while swap = 0
    for (int r = 0; r < 2**(AW-1); r++) begin
      @(negedge clk); h_we = 1; h_addr = (AW-1)'(r); h_wdata = 32'($urandom); area[0][r] = h_wdata;
    end
    @(negedge clk); h_we = 0; swap = 1;
    // SAT reads area 0 while the host writes area 1
    for (int r = 0; r < 2**(AW-1); r++) begin
      @(negedge clk);
      s_addr = AW'(2*r + (r % 2));
      h_we = 1; h_addr = (AW-1)'(r); h_wdata = 32'($urandom); area[1][r] = h_wdata;
      @(negedge clk); h_we = 0;
      check(s_rdata == ((r % 2) ? area[0][r][31:16] : area[0][r][15:0]),
            $sformatf("SAT read of area 0 word %0d", 2*r + (r % 2)));
    end
    // host reads back area 1
    for (int r = 0; r < 2**(AW-1); r += 7) begin
      @(negedge clk); h_addr = (AW-1)'(r);
      @(negedge clk);
      check(h_rdata == area[1][r], $sformatf("host read of area 1 row %0d", r));
    end
    // swap back: SAT now sees area 1, host area 0
    @(negedge clk); swap = 0;
    for (int r = 0; r < 2**(AW-1); r += 5) begin
      @(negedge clk); s_addr = AW'(2*r + 1); h_addr = (AW-1)'(r);
      @(negedge clk);
      check(s_rdata == area[1][r][31:16], $sformatf("SAT read of area 1 row %0d", r));
      check(h_rdata == area[0][r], $sformatf("host read of area 0 row %0d", r));
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
