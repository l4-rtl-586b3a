// l4_pe: one processing element of the L4 routing array.
//
// A PE stands for one horizontal grid position (x, y) and holds the state of
// the gridpoint on every one of the LAYERS layers. The layer states circulate
// through a state sequencer, a ring of LAYERS cells: cell 0 is the gridpoint
// being processed this cycle (current state CS), cell 1 is the gridpoint one
// layer up, and the next state NS enters at the top of the ring. All PEs step
// in lock-step, so every PE works on the same layer in the same cycle and the
// east/west/north/south neighbours exchange the "expanded" flag (XO) of that
// layer. The up neighbour (UI) is read from cell 1 and the down neighbour (DI)
// from a one-bit register holding the XO of the layer processed the cycle
// before; both therefore hold values from before the current expansion sweep,
// so one sweep over all layers advances the wavefront by exactly one step.
// layer_first / layer_last (broadcast) mask DI and UI at the bottom and top.
//
// Commands (cmd, broadcast, applied to the current layer):
//   READ    sto = CS if the PE is selected (RSEL & CSEL), else all ones
//   WRITE   NS = state_in if selected (ETCHED cleared)
//   CLEARX  expanded gridpoints return to EMPTY, or to BLOCKED if ETCHED
//   CLEART  TRACED gridpoints become BLOCKED (end of a multi-terminal net)
//   EXPAND  an EMPTY gridpoint (or, with etch_en, a BLOCKED one) that has an
//           expanded neighbour takes the state XE/XW/XN/XS/XU/XD of the first
//           such neighbour in that priority order; ETCHED records that it was
//           an obstacle. sto[0] is low if the PE is selected and its gridpoint
//           is (now) expanded; sto[1] is low if the gridpoint is entering an
//           expanded state this cycle.
// The command set, the priority order, the two EXPAND status bits, the TRACED
// and UNETCHABLE states and the ETCHED bit follow the published design; the
// state encoding, the CLEART command name, the ring organisation and the
// masking flags are this design's own choices.
//
// Timing: all state changes happen on the rising clock edge; sto and xo are
// combinational from the current cell and the broadcast inputs.
module l4_pe
  import l4_pkg::*;
#(
  parameter int unsigned LAYERS = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  pe_cmd_e            cmd,
  input  cell_state_e        state_in,
  input  logic               etch_en,
  input  logic               layer_first,   // current layer is layer 0
  input  logic               layer_last,    // current layer is layer LAYERS-1
  input  logic               rsel,
  input  logic               csel,
  input  logic               ei,            // east neighbour expanded
  input  logic               wi,
  input  logic               ni,
  input  logic               si,
  output logic               xo,            // this gridpoint is expanded
  output logic [CELLW-1:0]   sto
);

  cell_t ring [LAYERS];
  logic  prev_xo;
  cell_t cs, ns;
  logic  sel, ui, di, entering, can_enter;

  assign cs  = ring[0];
  assign sel = rsel & csel;
  assign xo  = is_source(cs.st);
  assign ui  = !layer_last  && is_source(ring[1 % LAYERS].st);
  assign di  = !layer_first && prev_xo;

  always_comb begin
    ns        = cs;
    entering  = 1'b0;
    can_enter = (cs.st == ST_EMPTY) || (etch_en && cs.st == ST_BLOCKED);
    sto       = '1;
    unique case (cmd)
      PE_READ:  if (sel) sto = cs;
      PE_WRITE: if (sel) ns = '{etched: 1'b0, st: state_in};
      PE_CLEARX:
        if (is_xstate(cs.st)) ns = '{etched: 1'b0, st: (cs.etched ? ST_BLOCKED : ST_EMPTY)};
      PE_CLEART:
        if (cs.st == ST_TRACED) ns = '{etched: 1'b0, st: ST_BLOCKED};
      PE_EXPAND: begin
        if (can_enter && (ei || wi || ni || si || ui || di)) begin
          entering  = 1'b1;
          ns.etched = (cs.st == ST_BLOCKED);
          if      (ei) ns.st = ST_XE;
          else if (wi) ns.st = ST_XW;
          else if (ni) ns.st = ST_XN;
          else if (si) ns.st = ST_XS;
          else if (ui) ns.st = ST_XU;
          else         ns.st = ST_XD;
        end
        sto[0] = !(sel && is_xstate(ns.st));
        sto[1] = !entering;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAYERS; i++) ring[i] <= '{etched: 1'b0, st: ST_EMPTY};
      prev_xo <= 1'b0;
    end else begin
      for (int i = 0; i < LAYERS - 1; i++) ring[i] <= ring[i+1];
      ring[LAYERS-1] <= ns;
      prev_xo        <= xo;
    end
  end

  initial assert (LAYERS >= 2 && LAYERS <= 16) else $error("LAYERS must be 2..16");

endmodule
