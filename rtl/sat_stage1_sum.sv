// sat_stage1_sum: stage one summing controller of the SAT.
//
// For each 16-wide column of the stage one matrix the controller walks the
// tuple pointer list in buffer memory. Each pointer selects one matrix line;
// the weights word at (column offset + pointer) is read and the shared
// summing counters are clocked with it, so every counter whose weight bit is
// set counts up. After the last pointer the sixteen counts are written to
// buffer memory (column c goes to sv_addr + 16*c .. +15), the counters are
// cleared and the column offset is advanced by the column length. This is the
// procedure of the design description; the state sequence is this design's.
//
// Per tuple pointer three cycles: PTR puts the list address on the buffer
// bus, WADDR has the pointer on b_rdata (the weights address unit adds it to
// the column offset and the weights memory samples that address), ACC has the
// weights word and clocks the counters. Per column 16 write cycles and one
// cycle to advance. `done` is high for one cycle,
//   2 + n_cols1 * (3 * n_tuples + 17) cycles after the cycle of `start`
// (one start cycle, the columns, then the done cycle).
// Memories are assumed to return read data one cycle after the address.
module sat_stage1_sum
  import sat_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  ctrl_t                  ctrl,
  output logic                   done,
  // buffer memory (SAT side)
  output addr_t                  b_addr,
  output logic                   b_we,
  output word_t                  b_wdata,
  // weights address unit
  output logic                   wa_load,
  output addr_t                  wa_base,
  output logic                   wa_next,
  output addr_t                  wa_len,
  // summing counters
  output logic                   cnt_clr,
  output logic                   cnt_en,
  input  logic [NCNT-1:0][CNT_W-1:0] cnt
);

  typedef enum logic [2:0] {S_IDLE, S_START, S_PTR, S_WADDR, S_ACC, S_WRITE, S_NEXT, S_DONE} state_e;
  state_e state;

  word_t tup;   // tuple pointer index within the column
  word_t col;   // column index
  logic [3:0] k;  // summed value being written

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      tup   <= '0;
      col   <= '0;
      k     <= '0;
    end else begin
      case (state)
        S_IDLE:  if (start) state <= S_START;
        S_START: begin
          tup <= '0;
          col <= '0;
          k   <= '0;
          if (ctrl.n_cols1 == '0)       state <= S_DONE;
          else if (ctrl.n_tuples == '0) state <= S_WRITE;
          else                          state <= S_PTR;
        end
        S_PTR:   state <= S_WADDR;
        S_WADDR: state <= S_ACC;
        S_ACC: begin
          tup <= tup + 1'b1;
          if (tup + 1'b1 == ctrl.n_tuples) state <= S_WRITE;
          else                             state <= S_PTR;
        end
        S_WRITE: begin
          k <= k + 1'b1;
          if (k == 4'(NCNT - 1)) state <= S_NEXT;
        end
        S_NEXT: begin
          tup <= '0;
          col <= col + 1'b1;
          if (col + 1'b1 == ctrl.n_cols1)  state <= S_DONE;
          else if (ctrl.n_tuples == '0)    state <= S_WRITE;
          else                             state <= S_PTR;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    b_addr  = '0;
    b_we    = 1'b0;
    b_wdata = '0;
    wa_load = 1'b0;
    wa_base = ctrl.w_off1;
    wa_next = 1'b0;
    wa_len  = ctrl.col_len1;
    cnt_clr = 1'b0;
    cnt_en  = 1'b0;
    done    = 1'b0;
    case (state)
      S_START: begin wa_load = 1'b1; cnt_clr = 1'b1; end
      S_PTR:   b_addr = ctrl.tp_addr + tup;
      S_ACC:   cnt_en = 1'b1;
      S_WRITE: begin
        b_we    = 1'b1;
        b_addr  = ctrl.sv1_addr + {col[AW-5:0], k};
        b_wdata = cnt[k];
      end
      S_NEXT:  begin wa_next = 1'b1; cnt_clr = 1'b1; end
      S_DONE:  done = 1'b1;
      default: ;
    endcase
  end

endmodule
