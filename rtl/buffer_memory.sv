// buffer_memory: the C node's buffer memory, split into two areas.
//
// One area (B1) is on the 32-bit local bus: the DSP puts the raw image and
// then the tuple pointers and control block there, and other nodes can reach
// it over the VME bus. The other area (B2) is on the 16-bit SAT bus, where
// the SAT reads its control data and pointers and keeps summed values, class
// bit addresses and results. `swap`, controlled by the DSP, exchanges the
// areas: with swap = 0 area 0 is on the local bus and area 1 on the SAT bus;
// with swap = 1 the other way round. Both areas work at the same time.
//
// Each area holds 2**AW 16-bit words, kept as two halves so that 32-bit
// local word n holds SAT words 2n (low half) and 2n+1 (high half). The areas,
// switching and bus widths follow the design description; the size, the
// packing and the synchronous reads are this design's choices.
//
// Timing: writes on the rising edge; read data one cycle after the address.
module buffer_memory #(
  parameter int unsigned AW = sat_pkg::AW
) (
  input  logic          clk,
  input  logic          swap,
  // local bus (DSP / VME side), 32-bit words
  input  logic [AW-2:0] h_addr,
  input  logic          h_we,
  input  logic [31:0]   h_wdata,
  output logic [31:0]   h_rdata,
  // SAT bus, 16-bit words
  input  logic [AW-1:0] s_addr,
  input  logic          s_we,
  input  logic [15:0]   s_wdata,
  output logic [15:0]   s_rdata
);

  localparam int unsigned DEPTH = 2 ** (AW - 1);

  logic [15:0] a0_lo [DEPTH];
  logic [15:0] a0_hi [DEPTH];
  logic [15:0] a1_lo [DEPTH];
  logic [15:0] a1_hi [DEPTH];

  logic [AW-2:0] s_row;
  assign s_row = s_addr[AW-1:1];

  // area 0: host side when swap = 0, SAT side when swap = 1
  always_ff @(posedge clk) begin
    if (!swap && h_we) begin
      a0_lo[h_addr] <= h_wdata[15:0];
      a0_hi[h_addr] <= h_wdata[31:16];
    end
    if (swap && s_we) begin
      if (s_addr[0]) a0_hi[s_row] <= s_wdata;
      else           a0_lo[s_row] <= s_wdata;
    end
  end

  // area 1: SAT side when swap = 0, host side when swap = 1
  always_ff @(posedge clk) begin
    if (swap && h_we) begin
      a1_lo[h_addr] <= h_wdata[15:0];
      a1_hi[h_addr] <= h_wdata[31:16];
    end
    if (!swap && s_we) begin
      if (s_addr[0]) a1_hi[s_row] <= s_wdata;
      else           a1_lo[s_row] <= s_wdata;
    end
  end

  always_ff @(posedge clk) begin
    h_rdata <= swap ? {a1_hi[h_addr], a1_lo[h_addr]} : {a0_hi[h_addr], a0_lo[h_addr]};
    if (swap) s_rdata <= s_addr[0] ? a0_hi[s_row] : a0_lo[s_row];
    else      s_rdata <= s_addr[0] ? a1_hi[s_row] : a1_lo[s_row];
  end

endmodule
