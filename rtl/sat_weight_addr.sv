// sat_weight_addr: weights address calculation for the summing stages.
//
// The weights of a matrix are stored column after column; a column is a run
// of `col_len` 16-bit words, one per matrix line, each word holding the 16
// class (or output) bits of that line. The address of a line is the current
// column offset plus the line's pointer (a tuple pointer in stage one, a class
// bit address in stage two). `load` sets the offset to the matrix base;
// `next_col` adds the column length, giving the offset of the next column.
// This follows the address calculation in the design description (offset +
// pointer, offset + column length per column); the adder width and the
// wrap-around at 2**AW are this design's choice.
//
// Timing: `addr` is combinational from the offset register and `ptr`;
// the offset changes on the clock edge after `load` or `next_col`
// (`load` wins).
module sat_weight_addr #(
  parameter int unsigned AW = sat_pkg::AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW-1:0] base,
  input  logic          next_col,
  input  logic [AW-1:0] col_len,
  input  logic [AW-1:0] ptr,
  output logic [AW-1:0] offset,
  output logic [AW-1:0] addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        offset <= '0;
    else if (load)     offset <= base;
    else if (next_col) offset <= offset + col_len;
  end

  assign addr = offset + ptr;

endmodule
