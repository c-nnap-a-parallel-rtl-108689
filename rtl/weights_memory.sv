// weights_memory: the C node's weights memory, split into two areas.
//
// One area (W1) is on the 32-bit host bus, where the DSP stores newly
// computed weights; the other (W2) is on the 16-bit SAT bus, holding the
// correlation matrices the SAT reads during recall. `swap` exchanges the two
// areas; the DSP controls it. Both areas are independently accessible at the
// same time. With swap = 0 area 0 is on the host bus and area 1 on the SAT
// bus; with swap = 1 the other way round.
//
// Each area holds 2**AW 16-bit words, stored as two 16-bit halves so a
// 32-bit host word covers SAT words 2n (low half) and 2n+1 (high half).
// The two areas, the DSP-controlled switching and the bus widths follow the
// design description; the area size, the half-word packing and the
// synchronous (one-cycle) reads are this design's choices.
//
// Timing: writes on the rising edge; read data one cycle after the address.
module weights_memory #(
  parameter int unsigned AW = sat_pkg::AW
) (
  input  logic          clk,
  input  logic          swap,
  // host bus (DSP / SCSI side), 32-bit words
  input  logic [AW-2:0] h_addr,
  input  logic          h_we,
  input  logic [31:0]   h_wdata,
  output logic [31:0]   h_rdata,
  // SAT bus, 16-bit words, read only
  input  logic [AW-1:0] s_addr,
  output logic [15:0]   s_rdata
);

  localparam int unsigned DEPTH = 2 ** (AW - 1);

  logic [15:0] a0_lo [DEPTH];
  logic [15:0] a0_hi [DEPTH];
  logic [15:0] a1_lo [DEPTH];
  logic [15:0] a1_hi [DEPTH];

  logic [AW-2:0] s_row;
  assign s_row = s_addr[AW-1:1];

  always_ff @(posedge clk) begin
    if (h_we && !swap) begin
      a0_lo[h_addr] <= h_wdata[15:0];
      a0_hi[h_addr] <= h_wdata[31:16];
    end
    if (h_we && swap) begin
      a1_lo[h_addr] <= h_wdata[15:0];
      a1_hi[h_addr] <= h_wdata[31:16];
    end
  end

  always_ff @(posedge clk) begin
    h_rdata <= swap ? {a1_hi[h_addr], a1_lo[h_addr]} : {a0_hi[h_addr], a0_lo[h_addr]};
    if (swap) s_rdata <= s_addr[0] ? a0_hi[s_row] : a0_lo[s_row];
    else      s_rdata <= s_addr[0] ? a1_hi[s_row] : a1_lo[s_row];
  end

endmodule
