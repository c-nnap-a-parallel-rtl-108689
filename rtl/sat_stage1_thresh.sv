// sat_stage1_thresh: stage one L-max thresholding of the SAT.
//
// L-max thresholding sets the L highest stage one summed values to 1. The
// controller works iteratively, as the design description gives it:
//   find pass  - read all class_size summed values and find the highest one
//                below the previous threshold (any value in the first
//                iteration); it becomes the current threshold;
//   match pass - read all summed values again; each that equals the current
//                threshold is a class bit, and its relative address (its
//                index) is written to the class bit address list in buffer
//                memory rather than the class pattern itself.
// Iterations repeat until at least L class bits have been found. All values
// equal to a threshold are taken, so ties can give more than L bits; `tau`
// reports the number found (the description notes it is usually L). An
// iteration whose best candidate is 0 ends the operation: matrix lines that
// no active line reaches are never class bits (this stop rule, and the
// tie handling, are this design's reading).
//
// Hardware, after the thresholding block diagram: a class count compared for
// equality with the stored class size (end of a pass), a magnitude
// comparison of each summed value with the stored threshold, and an equality
// comparison with it. The find pass also keeps the running maximum in a
// second register; that register and the pass structure are this design's.
//
// Timing: the find pass reads one value per cycle, the match pass takes two
// cycles per value (read, then compare and possibly write the address).
// An iteration takes 3*class_size + 6 cycles (set-up 1, find class_size + 2,
// evaluate 1, match 2*class_size + 1, end 1); a last find pass that finds
// no non-zero value takes class_size + 4. `done` is high in the cycle after
// the last of these, so with L = 0 it follows `start` by one cycle.
module sat_stage1_thresh
  import sat_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  ctrl_t ctrl,
  output logic  done,
  output word_t tau,     // class bits found
  output word_t iters,   // thresholding iterations run
  output addr_t b_addr,
  output logic  b_we,
  output word_t b_wdata,
  input  word_t b_rdata
);

  typedef enum logic [2:0] {T_IDLE, T_FIND_INIT, T_FIND, T_EVAL, T_MREAD, T_MCMP, T_MEND, T_DONE} state_e;
  state_e state;

  word_t class_cnt;   // index of the summed value being read
  logic  rd_valid;    // b_rdata holds the value of index class_cnt-1 (find pass)
  cnt_t  thr;         // current threshold store
  cnt_t  best;        // running maximum of the find pass
  logic  first;       // first iteration: no previous threshold

  logic end_of_pass;   // class count equals class size
  logic below_thr;     // summed value below the current threshold
  logic eq_thr;        // summed value equals the current threshold
  assign end_of_pass = (class_cnt == ctrl.class_size);
  assign below_thr   = (b_rdata < thr);
  assign eq_thr      = (b_rdata == thr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= T_IDLE;
      class_cnt <= '0;
      rd_valid  <= 1'b0;
      thr       <= '0;
      best      <= '0;
      first     <= 1'b1;
      tau       <= '0;
      iters     <= '0;
    end else begin
      case (state)
        T_IDLE: if (start) begin
          tau   <= '0;
          iters <= '0;
          first <= 1'b1;
          state <= (ctrl.l_bits == '0) ? T_DONE : T_FIND_INIT;
        end
        T_FIND_INIT: begin
          class_cnt <= '0;
          best      <= '0;
          rd_valid  <= 1'b0;
          state     <= T_FIND;
        end
        T_FIND: begin
          if (!end_of_pass) class_cnt <= class_cnt + 1'b1;
          rd_valid <= !end_of_pass;
          if (rd_valid && (first || below_thr) && (b_rdata > best)) best <= b_rdata;
          if (end_of_pass && !rd_valid) state <= T_EVAL;
        end
        T_EVAL: begin
          if (best == '0) begin
            state <= T_DONE;
          end else begin
            thr       <= best;
            iters     <= iters + 1'b1;
            class_cnt <= '0;
            state     <= T_MREAD;
          end
        end
        T_MREAD: state <= end_of_pass ? T_MEND : T_MCMP;
        T_MCMP: begin
          if (eq_thr) tau <= tau + 1'b1;
          class_cnt <= class_cnt + 1'b1;
          state     <= T_MREAD;
        end
        T_MEND: begin
          first <= 1'b0;
          state <= (tau >= ctrl.l_bits) ? T_DONE : T_FIND_INIT;
        end
        T_DONE:  state <= T_IDLE;
        default: state <= T_IDLE;
      endcase
    end
  end

  always_comb begin
    b_addr  = '0;
    b_we    = 1'b0;
    b_wdata = '0;
    done    = (state == T_DONE);
    case (state)
      T_FIND:  b_addr = ctrl.sv1_addr + class_cnt;
      T_MREAD: b_addr = ctrl.sv1_addr + class_cnt;
      T_MCMP:  if (eq_thr) begin
        b_we    = 1'b1;
        b_addr  = ctrl.cba_addr + tau;
        b_wdata = class_cnt;
      end
      default: ;
    endcase
  end

endmodule
