// l4_range_decoder: registered row or column decoder of the L4 array.
//
// Turns a range [lo, hi] of row (or column) indices into N select lines,
// line i being high when lo <= i <= hi. With lo == hi a single row/column is
// selected; together with the decoder of the other dimension this selects a
// single PE or any rectangle of PEs. The published design states the
// single/range function and that the decoder outputs are registered to shorten
// the path from the control unit to the array; the comparator form of the
// decode is this design's choice. If lo > hi nothing is selected.
//
// Timing: sel follows lo/hi one clock later. Reset clears all lines.
module l4_range_decoder
  import l4_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] lo,
  input  logic [CW-1:0] hi,
  output logic [N-1:0]  sel
);

  logic [N-1:0] sel_d;

  always_comb begin
    for (int i = 0; i < N; i++)
      sel_d[i] = (CW'(i) >= lo) && (CW'(i) <= hi);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel <= '0;
    else        sel <= sel_d;
  end

  initial assert (N >= 1 && N <= (1 << CW)) else $error("N out of range");

endmodule
