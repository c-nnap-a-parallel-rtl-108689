// sat_processor: the Sum And Threshold (SAT) processor.
//
// The SAT performs the recall of an ADAM binary associative memory in
// hardware, working directly on the C node's weights memory (the two
// correlation matrices) and buffer memory (control block, tuple pointers,
// summed values, class bit addresses and results), beside the DSP:
//   1. the control data loader reads the control block;
//   2. stage one summing sums, per 16-wide column, the matrix lines chosen
//      by the tuple pointers and stores the summed values;
//   3. stage one thresholding (L-max) stores the addresses of the class bits;
//   4. stage two sums the lines chosen by those addresses and applies
//      Willshaw thresholding, storing 16 output bits per column;
// and the interrupt handler sequences these and interrupts the DSP. One bank
// of sixteen 16-bit counters and one weights address unit are shared by both
// summing stages. The block structure follows the SAT block diagram; the bus
// multiplexing by phase is this design's.
//
// Interface: a buffer memory port (16-bit, read and write) and a weights
// memory port (16-bit, read only), both with one cycle of read latency and
// addressed every cycle; DSP-side `start` with `ctrl_addr`, `irq`/`irq_ack`,
// `busy`, `phase`, and the stage one results `tau` (class bits found) and
// `iters` (thresholding iterations).
module sat_processor
  import sat_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  addr_t  ctrl_addr,
  input  logic   irq_ack,
  output logic   irq,
  output logic   busy,
  output phase_e phase,
  output word_t  tau,
  output word_t  iters,
  output addr_t  b_addr,
  output logic   b_we,
  output word_t  b_wdata,
  input  word_t  b_rdata,
  output addr_t  w_addr,
  input  word_t  w_rdata
);

  ctrl_t ctrl;
  logic  ld_start, s1_start, th_start, s2_start;
  logic  ld_done,  s1_done,  th_done,  s2_done;

  sat_irq_handler u_irq (
    .clk, .rst_n, .start, .irq_ack,
    .stop_after (ctrl.stop_after),
    .ld_done, .s1_done, .th_done, .s2_done,
    .ld_start, .s1_start, .th_start, .s2_start,
    .phase, .busy, .irq
  );

  addr_t ld_b_addr;
  sat_ctrl_loader u_ld (
    .clk, .rst_n, .start (ld_start), .base (ctrl_addr), .done (ld_done),
    .ctrl, .b_addr (ld_b_addr), .b_rdata
  );

  // Shared summing hardware.
  logic [NCNT-1:0][CNT_W-1:0] cnt;
  logic  cnt_clr, cnt_en;
  logic  wa_load, wa_next;
  addr_t wa_base, wa_len, wa_offset;

  sat_sum_counters u_cnt (
    .clk, .rst_n, .clear (cnt_clr), .en (cnt_en), .weights (w_rdata), .cnt
  );

  sat_weight_addr u_wa (
    .clk, .rst_n, .load (wa_load), .base (wa_base), .next_col (wa_next),
    .col_len (wa_len), .ptr (b_rdata), .offset (wa_offset), .addr (w_addr)
  );

  addr_t s1_b_addr, th_b_addr, s2_b_addr;
  logic  s1_b_we, th_b_we, s2_b_we;
  word_t s1_b_wdata, th_b_wdata, s2_b_wdata;
  logic  s1_wa_load, s1_wa_next, s1_cnt_clr, s1_cnt_en;
  logic  s2_wa_load, s2_wa_next, s2_cnt_clr, s2_cnt_en;
  addr_t s1_wa_base, s1_wa_len, s2_wa_base, s2_wa_len;

  sat_stage1_sum u_s1 (
    .clk, .rst_n, .start (s1_start), .ctrl, .done (s1_done),
    .b_addr (s1_b_addr), .b_we (s1_b_we), .b_wdata (s1_b_wdata),
    .wa_load (s1_wa_load), .wa_base (s1_wa_base), .wa_next (s1_wa_next), .wa_len (s1_wa_len),
    .cnt_clr (s1_cnt_clr), .cnt_en (s1_cnt_en), .cnt
  );

  sat_stage1_thresh u_th (
    .clk, .rst_n, .start (th_start), .ctrl, .done (th_done), .tau, .iters,
    .b_addr (th_b_addr), .b_we (th_b_we), .b_wdata (th_b_wdata), .b_rdata
  );

  sat_stage2 u_s2 (
    .clk, .rst_n, .start (s2_start), .ctrl, .tau, .done (s2_done),
    .b_addr (s2_b_addr), .b_we (s2_b_we), .b_wdata (s2_b_wdata),
    .wa_load (s2_wa_load), .wa_base (s2_wa_base), .wa_next (s2_wa_next), .wa_len (s2_wa_len),
    .cnt_clr (s2_cnt_clr), .cnt_en (s2_cnt_en), .cnt
  );

  // Bus and shared-hardware multiplexing by phase.
  always_comb begin
    b_addr  = ld_b_addr;
    b_we    = 1'b0;
    b_wdata = '0;
    wa_load = 1'b0;
    wa_base = s1_wa_base;
    wa_next = 1'b0;
    wa_len  = s1_wa_len;
    cnt_clr = 1'b0;
    cnt_en  = 1'b0;
    unique case (phase)
      PH_S1SUM: begin
        b_addr = s1_b_addr; b_we = s1_b_we; b_wdata = s1_b_wdata;
        wa_load = s1_wa_load; wa_next = s1_wa_next;
        cnt_clr = s1_cnt_clr; cnt_en = s1_cnt_en;
      end
      PH_S1THR: begin
        b_addr = th_b_addr; b_we = th_b_we; b_wdata = th_b_wdata;
      end
      PH_S2: begin
        b_addr = s2_b_addr; b_we = s2_b_we; b_wdata = s2_b_wdata;
        wa_load = s2_wa_load; wa_base = s2_wa_base; wa_next = s2_wa_next; wa_len = s2_wa_len;
        cnt_clr = s2_cnt_clr; cnt_en = s2_cnt_en;
      end
      default: ;
    endcase
  end

endmodule
