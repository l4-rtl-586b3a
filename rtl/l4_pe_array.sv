// l4_pe_array: the two-dimensional PE array of the L4 accelerator.
//
// GRID_X x GRID_Y PEs, PE (x, y) standing for grid column x and row y. Each
// PE's expanded flag XO drives the WI input of its east neighbour (x+1), the
// EI input of its west neighbour (x-1), the SI input of its north neighbour
// (y+1) and the NI input of its south neighbour (y-1); inputs at the array
// edge are tied low. CMD, STATE_IN, the etch enable and the layer flags are
// broadcast to every PE; PE (x, y) is selected by row line y and column line
// x. The STATE_OUT outputs of all PEs are ANDed and the result registered,
// as in the published design; the registered AND tree is the array's only
// pipeline stage. Taking north as increasing y is this design's convention.
//
// Timing: status is the AND of the PE outputs of the previous cycle.
module l4_pe_array
  import l4_pkg::*;
#(
  parameter int unsigned GRID_X = 32,
  parameter int unsigned GRID_Y = 32,
  parameter int unsigned LAYERS = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pe_cmd_e           cmd,
  input  cell_state_e       state_in,
  input  logic              etch_en,
  input  logic              layer_first,
  input  logic              layer_last,
  input  logic [GRID_Y-1:0] row_sel,
  input  logic [GRID_X-1:0] col_sel,
  output logic [CELLW-1:0]  status
);

  logic [GRID_X-1:0]  xo  [GRID_Y];
  logic [CELLW-1:0]   sto [GRID_Y][GRID_X];
  logic [CELLW-1:0]   and_all;

  for (genvar y = 0; y < GRID_Y; y++) begin : g_row
    for (genvar x = 0; x < GRID_X; x++) begin : g_col
      logic ei, wi, ni, si;
      assign ei = (x + 1 < GRID_X) ? xo[y][(x + 1) % GRID_X] : 1'b0;
      assign wi = (x > 0)          ? xo[y][(x + GRID_X - 1) % GRID_X] : 1'b0;
      assign ni = (y + 1 < GRID_Y) ? xo[(y + 1) % GRID_Y][x] : 1'b0;
      assign si = (y > 0)          ? xo[(y + GRID_Y - 1) % GRID_Y][x] : 1'b0;
      l4_pe #(.LAYERS(LAYERS)) u_pe (
        .clk, .rst_n, .cmd, .state_in, .etch_en, .layer_first, .layer_last,
        .rsel(row_sel[y]), .csel(col_sel[x]),
        .ei, .wi, .ni, .si,
        .xo(xo[y][x]), .sto(sto[y][x])
      );
    end
  end

  always_comb begin
    and_all = '1;
    for (int y = 0; y < GRID_Y; y++)
      for (int x = 0; x < GRID_X; x++)
        and_all &= sto[y][x];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) status <= '1;
    else        status <= and_all;
  end

endmodule
