// sat_ctrl_loader: control data loader of the SAT.
//
// On `start` it reads the CTRL_WORDS-word control block at `base` in buffer
// memory, one word per cycle, and holds the decoded fields in `ctrl` for the
// summing and thresholding stages (layout in sat_pkg). The description says
// only that control data, including the weights offset, is loaded from buffer
// memory; the word layout and the one-word-per-cycle read are this design's.
//
// Timing: read data is expected one cycle after the address. `done` pulses
// CTRL_WORDS + 2 cycles after the cycle in which `start` is seen; `ctrl`
// is valid from then until the next `start`.
module sat_ctrl_loader
  import sat_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  addr_t base,
  output logic  done,
  output ctrl_t ctrl,
  output addr_t b_addr,
  input  word_t b_rdata
);

  localparam int unsigned IW = $clog2(CTRL_WORDS + 1);

  logic          busy;
  logic [IW-1:0] idx;       // next word to address
  logic [IW-1:0] idx_d;     // word on b_rdata
  logic          rd_valid;
  word_t         words [CTRL_WORDS];
  addr_t         base_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      idx      <= '0;
      idx_d    <= '0;
      rd_valid <= 1'b0;
      done     <= 1'b0;
      base_q   <= '0;
      for (int i = 0; i < CTRL_WORDS; i++) words[i] <= '0;
    end else begin
      done     <= 1'b0;
      rd_valid <= busy && (idx != IW'(CTRL_WORDS));
      idx_d    <= idx;
      if (start && !busy) begin
        busy   <= 1'b1;
        idx    <= '0;
        base_q <= base;
      end else if (busy) begin
        if (idx != IW'(CTRL_WORDS)) idx <= idx + 1'b1;
        if (rd_valid) words[idx_d] <= b_rdata;
        if (rd_valid && idx_d == IW'(CTRL_WORDS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign b_addr = base_q + addr_t'(idx);

  always_comb begin
    ctrl               = '0;
    ctrl.store_s2_sums = words[0][0];
    ctrl.stop_after    = stop_e'(words[0][2:1]);
    ctrl.n_tuples      = words[1];
    ctrl.col_len1      = words[2];
    ctrl.w_off1        = words[3];
    ctrl.n_cols1       = words[4];
    ctrl.class_size    = words[5];
    ctrl.l_bits        = words[6];
    ctrl.tp_addr       = words[7];
    ctrl.sv1_addr      = words[8];
    ctrl.cba_addr      = words[9];
    ctrl.w_off2        = words[10];
    ctrl.col_len2      = words[11];
    ctrl.n_cols2       = words[12];
    ctrl.out_addr      = words[13];
    ctrl.sv2_addr      = words[14];
  end

endmodule
