// sat_sum_counters: the SAT's bank of summing counters.
//
// NCNT counters of CNT_W bits (sixteen 16-bit counters, as in the design
// description) work in parallel, one per bit of a weights word: when `en` is
// high, every counter whose weight bit is 1 counts up by one, so sixteen
// matrix bits are summed per clock. `clear` zeroes all counters and wins over
// `en`. The counters wrap at 2**CNT_W; the description does not say what
// happens on overflow, and a count can not exceed the number of lines summed.
// The same bank serves stage one and stage two summing.
//
// Timing: counts change on the rising clock edge after `en` or `clear`;
// `cnt` shows the registered counts.
module sat_sum_counters #(
  parameter int unsigned NCNT  = sat_pkg::NCNT,
  parameter int unsigned CNT_W = sat_pkg::CNT_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       en,
  input  logic [NCNT-1:0]            weights,
  output logic [NCNT-1:0][CNT_W-1:0] cnt
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else if (clear) begin
      cnt <= '0;
    end else if (en) begin
      for (int unsigned i = 0; i < NCNT; i++)
        if (weights[i]) cnt[i] <= cnt[i] + 1'b1;
    end
  end

endmodule
