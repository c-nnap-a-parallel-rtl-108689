// tb_buffer_memory: the host writes area 0, swaps, and the SAT side reads it
// and overwrites half-words in it while the host fills area 1; after the
// next swap the host must read the SAT's results from area 0 and the SAT
// side must see the host's data in area 1. Small areas (AW = 8).
module tb_buffer_memory;
  localparam int AW = 8;
  localparam int R = 2 ** (AW - 1);
  logic clk = 0;
  always #5 clk = ~clk;
  logic swap = 0;
  logic [AW-2:0] h_addr = '0;
  logic h_we = 0;
  logic [31:0] h_wdata = '0, h_rdata;
  logic [AW-1:0] s_addr = '0;
  logic s_we = 0;
  logic [15:0] s_wdata = '0, s_rdata;
  logic [31:0] area [2][R];
  int checks = 0, failures = 0;

  buffer_memory #(.AW(AW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int r = 0; r < R; r++) begin
      @(negedge clk); h_we = 1; h_addr = (AW-1)'(r); h_wdata = 32'($urandom); area[0][r] = h_wdata;
    end
    @(negedge clk); h_we = 0; swap = 1;
    // SAT: read a word of area 0, then write one half-word; host fills area 1
    for (int r = 0; r < R; r++) begin
      @(negedge clk);
      s_we = 0; s_addr = AW'(2*r);
      h_we = 1; h_addr = (AW-1)'(r); h_wdata = 32'($urandom); area[1][r] = h_wdata;
      @(negedge clk);
      h_we = 0;
      check(s_rdata == area[0][r][15:0], $sformatf("SAT read area 0 word %0d", 2*r));
      s_we = 1; s_addr = AW'(2*r + (r % 2)); s_wdata = 16'($urandom);
      if (r % 2) area[0][r][31:16] = s_wdata; else area[0][r][15:0] = s_wdata;
    end
    @(negedge clk); s_we = 0; swap = 0;
    for (int r = 0; r < R; r++) begin
      @(negedge clk); h_addr = (AW-1)'(r); s_addr = AW'(2*r + 1);
      @(negedge clk);
      check(h_rdata == area[0][r], $sformatf("host read of SAT results, row %0d", r));
      check(s_rdata == area[1][r][31:16], $sformatf("SAT read of area 1, row %0d", r));
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
