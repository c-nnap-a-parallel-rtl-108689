// dsp_memory: the DSP's private memory (program store and scratch space).
//
// A single-port 32-bit RAM on the DSP bus that only the DSP reaches. Its
// existence, its users and the 32-bit bus follow the design description; the
// depth (2**AW words) and the synchronous read with one cycle of latency are
// this design's choices. Byte enables `be` write single bytes.
//
// Timing: writes on the rising edge; read data one cycle after the address.
module dsp_memory #(
  parameter int unsigned AW = 14
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [3:0]    be,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);

  logic [31:0] mem [2 ** AW];

  always_ff @(posedge clk) begin
    if (we)
      for (int b = 0; b < 4; b++)
        if (be[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
    rdata <= mem[addr];
  end

endmodule
