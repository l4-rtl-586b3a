// l4_top: the L4 maze-routing accelerator core.
//
// Wires the blocks of the accelerator together: the control unit takes
// 32-bit command words, drives the registered row and column decoders with
// the row/column ranges it wants selected, broadcasts PE commands, the write
// state and the etch enable to the GRID_X x GRID_Y PE array (each PE holding
// all LAYERS layers of one grid position), and reads back the registered AND
// of all PE status outputs. Result words (wire-segment endpoints, etched
// points, status with cycle count, read data) leave through the result port.
//
// In the published system the command and result ports are fed by vendor
// FIFO cores behind a PCI target; those are not part of this RTL, so the two
// word streams are the top's ports, each with a valid/ready handshake (a word
// moves when valid && ready). The block structure follows the published
// organisation; the port handshake is this design's choice.
//
// Default size: 32 x 32 grid positions, 16 layers, etching enabled.
module l4_top
  import l4_pkg::*;
#(
  parameter int unsigned GRID_X  = 32,
  parameter int unsigned GRID_Y  = 32,
  parameter int unsigned LAYERS  = 16,
  parameter bit          ETCHING = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cmd_valid,
  output logic         cmd_ready,
  input  cmd_word_t    cmd_word,
  output logic         res_valid,
  input  logic         res_ready,
  output result_word_t res_word
);

  pe_cmd_e           pe_cmd;
  cell_state_e       pe_state_in;
  logic              pe_etch_en, layer_first, layer_last;
  logic [CELLW-1:0]  status;
  logic [CW-1:0]     rs1, rs2, cs1, cs2;
  logic [GRID_Y-1:0] row_sel;
  logic [GRID_X-1:0] col_sel;

  l4_control_unit #(
    .GRID_X(GRID_X), .GRID_Y(GRID_Y), .LAYERS(LAYERS), .ETCHING(ETCHING)
  ) u_cu (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_word,
    .res_valid, .res_ready, .res_word,
    .pe_cmd, .pe_state_in, .pe_etch_en, .layer_first, .layer_last,
    .status, .rs1, .rs2, .cs1, .cs2
  );

  l4_range_decoder #(.N(GRID_Y)) u_row_dec (.clk, .rst_n, .lo(rs1), .hi(rs2), .sel(row_sel));
  l4_range_decoder #(.N(GRID_X)) u_col_dec (.clk, .rst_n, .lo(cs1), .hi(cs2), .sel(col_sel));

  l4_pe_array #(
    .GRID_X(GRID_X), .GRID_Y(GRID_Y), .LAYERS(LAYERS)
  ) u_array (
    .clk, .rst_n,
    .cmd(pe_cmd), .state_in(pe_state_in), .etch_en(pe_etch_en),
    .layer_first, .layer_last, .row_sel, .col_sel, .status
  );

endmodule
