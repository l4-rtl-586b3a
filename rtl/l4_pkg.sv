// l4_pkg: types and constants shared by the L4 maze-routing accelerator.
//
// A gridpoint is held as a 4-bit state code plus an ETCHED flag. The state
// codes (EMPTY, BLOCKED, the six "expanded" directions XE..XD, TRACED for
// multi-terminal nets and UNETCHABLE for fixed obstacles) follow the states the
// routing method needs; their binary values are this design's choice. EMPTY is
// all ones so that the AND of many READ results equals EMPTY only when every
// gridpoint read is EMPTY (the "line probe").
//
// Host command and result words are 32 bits. A grid point is packed as
// {x[4:0], y[4:0], z[3:0]}, which covers the 32 x 32 x 16 grid of the main
// configuration; the field layout is this design's choice.
package l4_pkg;

  localparam int CW = 5;               // x / y coordinate width (up to 32)
  localparam int ZW = 4;               // layer index width (up to 16)
  localparam int CELLW = 5;            // stored bits per gridpoint
  localparam int CNTW = 28;            // cycle-count field in a status word

  typedef enum logic [3:0] {
    ST_BLOCKED = 4'h0,
    ST_XE      = 4'h1,   // expansion arrived from the east neighbour
    ST_XW      = 4'h2,   // ... from the west
    ST_XN      = 4'h3,   // ... from the north
    ST_XS      = 4'h4,   // ... from the south
    ST_XU      = 4'h5,   // ... from the layer above
    ST_XD      = 4'h6,   // ... from the layer below
    ST_TRACED  = 4'h7,   // part of the partial connection of the current net
    ST_UNETCH  = 4'h8,   // obstacle that etching may not remove
    ST_EMPTY   = 4'hF
  } cell_state_e;

  typedef struct packed {
    logic        etched;  // gridpoint was an obstacle when it was expanded
    cell_state_e st;
  } cell_t;

  // Low-level commands broadcast from the control unit to every PE.
  typedef enum logic [2:0] {
    PE_NOP    = 3'd0,
    PE_READ   = 3'd1,
    PE_WRITE  = 3'd2,
    PE_CLEARX = 3'd3,
    PE_EXPAND = 3'd4,
    PE_CLEART = 3'd5     // final cleanup of a multi-terminal net: TRACED -> BLOCKED
  } pe_cmd_e;

  // Host command opcodes (bits 31:28 of a command word).
  typedef enum logic [3:0] {
    OP_NOP       = 4'h0,
    OP_ROUTE     = 4'h1,
    OP_SELECT    = 4'h2,
    OP_READ      = 4'h3,
    OP_WRITE     = 4'h4,
    OP_EXT_INIT  = 4'h5,  // ROUTE_EXTEND_INIT
    OP_EXTEND    = 4'h6   // ROUTE_EXTEND
  } host_op_e;

  // Result word types (bits 31:28 of a result word).
  typedef enum logic [3:0] {
    RS_SEGMENT = 4'h1,    // wire segment, two endpoints
    RS_ETCH    = 4'h2,    // etched gridpoint on the new connection
    RS_DONE    = 4'h3,    // command completed, cycle count
    RS_FAIL    = 4'h4,    // no connection possible, cycle count
    RS_READ    = 4'h5     // AND of the states read, in bits 4:0
  } result_e;

  typedef struct packed {
    logic [CW-1:0] x;
    logic [CW-1:0] y;
    logic [ZW-1:0] z;
  } point_t;

  typedef struct packed {
    host_op_e op;
    point_t   a;         // first point (source, or region corner)
    point_t   b;         // second point (target, or region corner); b.z also
                         // carries the state of a WRITE
  } cmd_word_t;

  typedef struct packed {
    result_e  kind;
    point_t   a;
    point_t   b;
  } result_word_t;

  // A gridpoint that has been reached by the current expansion.
  function automatic logic is_xstate(cell_state_e s);
    return (s == ST_XE) || (s == ST_XW) || (s == ST_XN) ||
           (s == ST_XS) || (s == ST_XU) || (s == ST_XD);
  endfunction

  // A gridpoint that neighbours see as a source of expansion.
  function automatic logic is_source(cell_state_e s);
    return is_xstate(s) || (s == ST_TRACED);
  endfunction

endpackage
