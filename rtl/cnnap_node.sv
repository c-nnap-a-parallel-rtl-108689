// cnnap_node: the memory and SAT part of a C-NNAP node (C node).
//
// A C node pipelines ADAM recall between a DSP and the SAT processor. The
// DSP tuples the input image into tuple pointers, writes them with a control
// block into its area of the buffer memory and, with new weights in its
// area of the weights memory, swaps the areas to hand them to the SAT. The
// SAT then sums and thresholds on its areas while the DSP prepares the next
// image in the other ones, and interrupts the DSP when the recalled pattern
// is in buffer memory. This module holds the three node memories (weights,
// buffer, DSP) and the SAT; the DSP, SCSI controller, VME interface and bus
// arbitration are outside it and their sides of the buses are ports here.
//
// Ports:
//   w_*   host bus to the host-side weights area (32-bit words), w_swap
//   b_*   local bus to the host-side buffer area (32-bit words), b_swap
//   d_*   DSP bus to the DSP memory
//   sat_* SAT start with control block address (a SAT-side buffer word
//         address), interrupt and acknowledge, busy, phase and the stage one
//         results (tau class bits found, iters thresholding iterations)
// The memory structure and the bus widths (32 on the host and local buses,
// 16 on the SAT bus) follow the node architecture; memory sizes, the SAT
// start/interrupt signals and the single clock are this design's choices.
module cnnap_node
  import sat_pkg::*;
#(
  parameter int unsigned MEM_AW = sat_pkg::AW,  // SAT word address bits per area
  parameter int unsigned DSP_AW = 14            // DSP memory, 32-bit words
) (
  input  logic              clk,
  input  logic              rst_n,
  // weights memory, host side
  input  logic              w_swap,
  input  logic [MEM_AW-2:0] w_addr,
  input  logic              w_we,
  input  logic [31:0]       w_wdata,
  output logic [31:0]       w_rdata,
  // buffer memory, local-bus side
  input  logic              b_swap,
  input  logic [MEM_AW-2:0] b_addr,
  input  logic              b_we,
  input  logic [31:0]       b_wdata,
  output logic [31:0]       b_rdata,
  // DSP memory
  input  logic [DSP_AW-1:0] d_addr,
  input  logic              d_we,
  input  logic [3:0]        d_be,
  input  logic [31:0]       d_wdata,
  output logic [31:0]       d_rdata,
  // SAT control
  input  logic              sat_start,
  input  addr_t             sat_ctrl_addr,
  input  logic              sat_irq_ack,
  output logic              sat_irq,
  output logic              sat_busy,
  output phase_e            sat_phase,
  output word_t             sat_tau,
  output word_t             sat_iters
);

  // SAT bus
  addr_t sb_addr, sw_addr;
  logic  sb_we;
  word_t sb_wdata, sb_rdata, sw_rdata;

  sat_processor u_sat (
    .clk, .rst_n,
    .start (sat_start), .ctrl_addr (sat_ctrl_addr), .irq_ack (sat_irq_ack),
    .irq (sat_irq), .busy (sat_busy), .phase (sat_phase),
    .tau (sat_tau), .iters (sat_iters),
    .b_addr (sb_addr), .b_we (sb_we), .b_wdata (sb_wdata), .b_rdata (sb_rdata),
    .w_addr (sw_addr), .w_rdata (sw_rdata)
  );

  weights_memory #(.AW (MEM_AW)) u_wmem (
    .clk, .swap (w_swap),
    .h_addr (w_addr), .h_we (w_we), .h_wdata (w_wdata), .h_rdata (w_rdata),
    .s_addr (MEM_AW'(sw_addr)), .s_rdata (sw_rdata)
  );

  buffer_memory #(.AW (MEM_AW)) u_bmem (
    .clk, .swap (b_swap),
    .h_addr (b_addr), .h_we (b_we), .h_wdata (b_wdata), .h_rdata (b_rdata),
    .s_addr (MEM_AW'(sb_addr)), .s_we (sb_we), .s_wdata (sb_wdata), .s_rdata (sb_rdata)
  );

  dsp_memory #(.AW (DSP_AW)) u_dmem (
    .clk, .addr (d_addr), .we (d_we), .be (d_be), .wdata (d_wdata), .rdata (d_rdata)
  );

  // The DSP hands areas over only while the SAT is idle.
  a_no_swap_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    sat_busy |-> ($stable(w_swap) && $stable(b_swap)))
    else $error("memory areas swapped while the SAT is busy");

endmodule
