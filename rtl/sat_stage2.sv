// sat_stage2: stage two summing and Willshaw thresholding of the SAT.
//
// Stage two uses the same summing hardware as stage one (the shared counters
// and weights address unit). The lines to sum are the class bits found by
// stage one thresholding, read from the class bit address list rather than
// from a full class pattern, so only the tau set bits cost time. For each
// 16-wide column of the stage two matrix the controller reads the tau class
// bit addresses, reads the weights word at (column offset + address) and
// clocks the counters. Willshaw thresholding then sets each of the sixteen
// output bits whose count equals tau, the number of class bits set; the
// 16-bit thresholded word is written to out_addr + column. The sixteen summed
// values are written too (to sv2_addr + 16*column ..) only when the control
// flag store_s2_sums asks for it. Summing, the threshold rule and the
// optional store follow the design description; comparing all sixteen counts
// with tau in one cycle and the state sequence are this design's choices.
// With tau = 0 every count equals tau and every output bit is set.
//
// Timing: 1 start cycle, then per column 3*tau cycles of summing, one cycle
// to threshold and write, 16 cycles if summed values are stored, and one
// cycle to advance to the next column.
module sat_stage2
  import sat_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  ctrl_t                  ctrl,
  input  word_t                  tau,
  output logic                   done,
  output addr_t                  b_addr,
  output logic                   b_we,
  output word_t                  b_wdata,
  output logic                   wa_load,
  output addr_t                  wa_base,
  output logic                   wa_next,
  output addr_t                  wa_len,
  output logic                   cnt_clr,
  output logic                   cnt_en,
  input  logic [NCNT-1:0][CNT_W-1:0] cnt
);

  typedef enum logic [2:0] {U_IDLE, U_START, U_PTR, U_WADDR, U_ACC, U_THR, U_SV, U_NEXT} state_e;
  state_e state;
  logic   done_q;

  word_t      bit_idx;  // class bit address being used
  word_t      col;
  logic [3:0] k;

  logic [NCNT-1:0] thresholded;
  always_comb
    for (int unsigned i = 0; i < NCNT; i++)
      thresholded[i] = (cnt[i] == tau);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= U_IDLE;
      bit_idx <= '0;
      col     <= '0;
      k       <= '0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      case (state)
        U_IDLE: if (start) state <= U_START;
        U_START: begin
          bit_idx <= '0;
          col     <= '0;
          k       <= '0;
          if (ctrl.n_cols2 == '0) begin
            done_q <= 1'b1;
            state  <= U_IDLE;
          end else begin
            state <= (tau == '0) ? U_THR : U_PTR;
          end
        end
        U_PTR:   state <= U_WADDR;
        U_WADDR: state <= U_ACC;
        U_ACC: begin
          bit_idx <= bit_idx + 1'b1;
          state   <= (bit_idx + 1'b1 == tau) ? U_THR : U_PTR;
        end
        U_THR:   state <= ctrl.store_s2_sums ? U_SV : U_NEXT;
        U_SV: begin
          k <= k + 1'b1;
          if (k == 4'(NCNT - 1)) state <= U_NEXT;
        end
        U_NEXT: begin
          bit_idx <= '0;
          col     <= col + 1'b1;
          if (col + 1'b1 == ctrl.n_cols2) begin
            done_q <= 1'b1;
            state  <= U_IDLE;
          end else begin
            state <= (tau == '0) ? U_THR : U_PTR;
          end
        end
        default: state <= U_IDLE;
      endcase
    end
  end

  assign done = done_q;

  always_comb begin
    b_addr  = '0;
    b_we    = 1'b0;
    b_wdata = '0;
    wa_load = 1'b0;
    wa_base = ctrl.w_off2;
    wa_next = 1'b0;
    wa_len  = ctrl.col_len2;
    cnt_clr = 1'b0;
    cnt_en  = 1'b0;
    case (state)
      U_START: begin wa_load = 1'b1; cnt_clr = 1'b1; end
      U_PTR:   b_addr = ctrl.cba_addr + bit_idx;
      U_ACC:   cnt_en = 1'b1;
      U_THR: begin
        b_we    = 1'b1;
        b_addr  = ctrl.out_addr + col;
        b_wdata = thresholded;
      end
      U_SV: begin
        b_we    = 1'b1;
        b_addr  = ctrl.sv2_addr + {col[AW-5:0], k};
        b_wdata = cnt[k];
      end
      U_NEXT:  begin wa_next = 1'b1; cnt_clr = 1'b1; end
      default: ;
    endcase
  end

endmodule
