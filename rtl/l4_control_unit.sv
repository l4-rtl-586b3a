// l4_control_unit: command sequencer of the L4 maze-routing accelerator.
//
// Accepts 32-bit host command words and turns each into a sequence of
// low-level PE commands broadcast to the whole array, one per clock, each
// applying to the layer the PEs' state sequencers hold that cycle. The unit
// keeps its own copy of that layer counter (lay); the command it registers
// for the next cycle is aimed at layer lay+1.
//
// Host commands (cmd_word_t: op[31:28], point a[27:14], point b[13:0]):
//   SELECT a b          store the box a..b (corners in any order)
//   READ                READ the box on its layers; returns one RS_READ word
//                       holding the AND of all states read
//   WRITE               WRITE state b.z to every gridpoint of the box; no reply
//   ROUTE a b           route a two-terminal connection from a to b
//   ROUTE_EXTEND_INIT a b  same, but the path is left TRACED (first two
//                       terminals of a multi-terminal net)
//   ROUTE_EXTEND b      connect b to the TRACED partial net
// A route runs: (ROUTE, ROUTE_EXTEND_INIT only) a CLEART sweep that turns any
// TRACED net left over into BLOCKED; WRITE source := TRACED; WRITE target :=
// EMPTY; expansion sweeps (EXPAND on layers 0..L-1) with the target selected
// until the target reports expanded; backtrace; a CLEARX sweep; (ROUTE only)
// a CLEART sweep; and a RS_DONE word carrying the command's cycle count.
// If a normal sweep makes no progress, the next sweep runs with etching
// enabled (ETCHING=1); if an etching sweep makes no progress, or ETCHING=0,
// the route ends with RS_FAIL. The backtrace reads each gridpoint, follows its
// direction state to the neighbour the expansion came from, writes the point
// BLOCKED (TRACED for the multi-terminal commands) and reports a RS_SEGMENT
// word whenever the direction changes and at the end, plus an RS_ETCH word
// for every etched point on the path. It stops on reaching a TRACED point.
//
// The host commands, the expansion / backtrace / cleanup phases, etching for
// one sweep after a failed expansion, the TRACED handling and the cycle
// counter follow the published design. Word layouts, the command sequence of
// each phase, the implicit CLEART at the start of ROUTE and
// ROUTE_EXTEND_INIT, writing the target EMPTY before expansion and the lack
// of a reply to SELECT/WRITE are this design's choices.
//
// Timing: the PE command, state and etch enable are registered. The row and
// column ranges are registered here and again in the decoders, so a range set
// on one edge is in force for the command issued on the next. The array
// status arrives two edges after the command is registered here (one edge in
// the PEs, one in the array's AND register); a tag pipeline carries the
// meaning of each status. Expansion sweeps run back to back; the result of a
// sweep is known while layer 0 of the next is in flight, which is harmless
// (see the comments at the evaluation). Handshakes: a word moves when
// valid && ready.
module l4_control_unit
  import l4_pkg::*;
#(
  parameter int unsigned GRID_X  = 32,
  parameter int unsigned GRID_Y  = 32,
  parameter int unsigned LAYERS  = 16,
  parameter bit          ETCHING = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  // host command stream (from the command FIFO)
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  cmd_word_t        cmd_word,
  // host result stream (to the result FIFO)
  output logic             res_valid,
  input  logic             res_ready,
  output result_word_t     res_word,
  // PE array broadcast
  output pe_cmd_e          pe_cmd,
  output cell_state_e      pe_state_in,
  output logic             pe_etch_en,
  output logic             layer_first,
  output logic             layer_last,
  input  logic [CELLW-1:0] status,
  // decoder ranges
  output logic [CW-1:0]    rs1,
  output logic [CW-1:0]    rs2,
  output logic [CW-1:0]    cs1,
  output logic [CW-1:0]    cs2
);

  localparam int unsigned LMAX = LAYERS - 1;
  localparam int unsigned BT_LIMIT = GRID_X * GRID_Y * LAYERS;

  typedef enum logic [4:0] {
    S_IDLE, S_RW_SWEEP, S_RW_DRAIN, S_RES,
    S_CLEART0, S_WSRC_SET, S_WSRC, S_WTGT_SET, S_WTGT,
    S_EXP_WAIT0, S_EXP,
    S_BT_SET, S_BT_READ, S_BT_RWAIT, S_BT_DECIDE, S_BT_EMIT, S_BT_WRITE,
    S_CLEARX, S_CLEART1, S_FINISH
  } state_e;

  typedef struct packed {
    logic exp;    // EXPAND status
    logic rd;     // READ status
    logic first;  // layer 0 of a sweep
    logic last;   // layer L-1 of a sweep
    logic tgt;    // target layer
    logic etch;   // etching sweep
  } tag_t;

  state_e        state;
  logic [ZW-1:0] lay, next_layer;
  tag_t          tag1, tag2, tag_d;
  pe_cmd_e       cmd_d;
  cell_state_e   st_in_d;
  logic          etch_d;

  // command registers
  host_op_e      op;
  point_t        src, tgt, p, seg_a;
  point_t        box_lo, box_hi;
  logic          multi;           // path is labelled TRACED
  logic          failed;
  logic [ZW:0]   sw_cnt;
  logic [1:0]    drain;
  logic [CELLW-1:0] acc_rd;
  logic          acc_prog, acc_hit;
  logic          etch_pending, etch_sweep;
  cell_t         rd_cell;
  cell_state_e   dir_prev;
  logic          bt_first, path_done, seg_pend, etch_pend;
  result_word_t  seg_word, etch_word, fin_word;
  logic [31:0]   bt_steps;

  // cycle counter
  logic            cnt_start, cnt_stop;
  logic [CNTW-1:0] cnt;

  l4_cycle_counter u_cnt (.clk, .rst_n, .start(cnt_start), .stop(cnt_stop), .count(cnt));

  assign next_layer  = (lay == ZW'(LMAX)) ? '0 : lay + 1'b1;
  assign cmd_ready   = (state == S_IDLE);
  assign cnt_start   = (state == S_IDLE) && cmd_valid &&
                       (cmd_word.op inside {OP_ROUTE, OP_EXT_INIT, OP_EXTEND});
  assign cnt_stop    = (state == S_FINISH);

  // expansion sweep evaluation, including the status arriving this cycle
  logic prog_now, hit_now, sweep_end;
  assign prog_now  = ((tag2.first) ? 1'b0 : acc_prog) | !status[1];
  assign hit_now   = ((tag2.first) ? 1'b0 : acc_hit)  | (tag2.tgt && !status[0]);
  assign sweep_end = tag2.exp && tag2.last;

  function automatic point_t step(point_t q, cell_state_e d);
    point_t r = q;
    unique case (d)
      ST_XE:   r.x = q.x + 1'b1;
      ST_XW:   r.x = q.x - 1'b1;
      ST_XN:   r.y = q.y + 1'b1;
      ST_XS:   r.y = q.y - 1'b1;
      ST_XU:   r.z = q.z + 1'b1;
      ST_XD:   r.z = q.z - 1'b1;
      default: ;
    endcase
    return r;
  endfunction

  function automatic logic in_layers(logic [ZW-1:0] z, logic [ZW-1:0] lo, logic [ZW-1:0] hi);
    return (z >= lo) && (z <= hi);
  endfunction

  // result stream
  always_comb begin
    res_valid = 1'b0;
    res_word  = fin_word;
    unique case (state)
      S_RES:    res_valid = 1'b1;
      S_FINISH: begin
        res_valid = 1'b1;
        res_word  = {fin_word.kind, cnt};
      end
      S_BT_EMIT: begin
        res_valid = seg_pend || etch_pend;
        res_word  = seg_pend ? seg_word : etch_word;
      end
      default: ;
    endcase
  end

  // command issue for the next cycle
  always_comb begin
    cmd_d   = PE_NOP;
    st_in_d = ST_EMPTY;
    etch_d  = 1'b0;
    tag_d   = '0;
    unique case (state)
      S_RW_SWEEP:
        if (in_layers(next_layer, box_lo.z, box_hi.z)) begin
          if (op == OP_READ) begin
            cmd_d    = PE_READ;
            tag_d.rd = 1'b1;
          end else begin
            cmd_d   = PE_WRITE;
            st_in_d = cell_state_e'(fin_word.b.z);
          end
        end
      S_CLEART0, S_CLEART1: cmd_d = PE_CLEART;
      S_CLEARX:             cmd_d = PE_CLEARX;
      S_WSRC:
        if (next_layer == src.z) begin
          cmd_d   = PE_WRITE;
          st_in_d = ST_TRACED;
        end
      S_WTGT:
        if (next_layer == tgt.z) begin
          cmd_d   = PE_WRITE;
          st_in_d = ST_EMPTY;
        end
      S_EXP_WAIT0, S_EXP:
        if ((state == S_EXP || next_layer == '0) &&
            !(state == S_EXP && sweep_end &&
              (hit_now || !prog_now))) begin
          cmd_d       = PE_EXPAND;
          etch_d      = (next_layer == '0) ? etch_pending : etch_sweep;
          tag_d.exp   = 1'b1;
          tag_d.first = (next_layer == '0);
          tag_d.last  = (next_layer == ZW'(LMAX));
          tag_d.tgt   = (next_layer == tgt.z);
          tag_d.etch  = etch_d;
        end
      S_BT_READ:
        if (next_layer == p.z) begin
          cmd_d    = PE_READ;
          tag_d.rd = 1'b1;
        end
      S_BT_WRITE:
        if (next_layer == p.z) begin
          cmd_d   = PE_WRITE;
          st_in_d = multi ? ST_TRACED : ST_BLOCKED;
        end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lay          <= '0;
      pe_cmd       <= PE_NOP;
      pe_state_in  <= ST_EMPTY;
      pe_etch_en   <= 1'b0;
      layer_first  <= 1'b1;   // the PEs start at layer 0
      layer_last   <= 1'b0;
      tag1         <= '0;
      tag2         <= '0;
      state        <= S_IDLE;
      op           <= OP_NOP;
      src          <= '0;
      tgt          <= '0;
      p            <= '0;
      seg_a        <= '0;
      box_lo       <= '0;
      box_hi       <= '0;
      multi        <= 1'b0;
      failed       <= 1'b0;
      sw_cnt       <= '0;
      drain        <= '0;
      acc_rd       <= '1;
      acc_prog     <= 1'b0;
      acc_hit      <= 1'b0;
      etch_pending <= 1'b0;
      etch_sweep   <= 1'b0;
      rd_cell      <= '{etched: 1'b0, st: ST_EMPTY};
      dir_prev     <= ST_EMPTY;
      bt_first     <= 1'b0;
      path_done    <= 1'b0;
      seg_pend     <= 1'b0;
      etch_pend    <= 1'b0;
      seg_word     <= '0;
      etch_word    <= '0;
      fin_word     <= '0;
      bt_steps     <= '0;
      rs1          <= '0;
      rs2          <= '0;
      cs1          <= '0;
      cs2          <= '0;
    end else begin
      // broadcast registers, aimed at next_layer
      lay         <= next_layer;
      pe_cmd      <= cmd_d;
      pe_state_in <= st_in_d;
      pe_etch_en  <= etch_d;
      layer_first <= (next_layer == '0);
      layer_last  <= (next_layer == ZW'(LMAX));
      tag1        <= tag_d;
      tag2        <= tag1;

      // status accumulation
      if (tag2.rd) acc_rd <= acc_rd & status;
      if (tag2.exp) begin
        acc_prog <= prog_now;
        acc_hit  <= hit_now;
      end
      if (cmd_d == PE_EXPAND && next_layer == '0) begin
        etch_sweep   <= etch_pending;
        etch_pending <= 1'b0;
      end

      unique case (state)
        S_IDLE:
          if (cmd_valid) begin
            op <= cmd_word.op;
            unique case (cmd_word.op)
              OP_SELECT: begin
                box_lo.x <= (cmd_word.a.x < cmd_word.b.x) ? cmd_word.a.x : cmd_word.b.x;
                box_hi.x <= (cmd_word.a.x < cmd_word.b.x) ? cmd_word.b.x : cmd_word.a.x;
                box_lo.y <= (cmd_word.a.y < cmd_word.b.y) ? cmd_word.a.y : cmd_word.b.y;
                box_hi.y <= (cmd_word.a.y < cmd_word.b.y) ? cmd_word.b.y : cmd_word.a.y;
                box_lo.z <= (cmd_word.a.z < cmd_word.b.z) ? cmd_word.a.z : cmd_word.b.z;
                box_hi.z <= (cmd_word.a.z < cmd_word.b.z) ? cmd_word.b.z : cmd_word.a.z;
              end
              OP_READ, OP_WRITE: begin
                rs1      <= box_lo.y;
                rs2      <= box_hi.y;
                cs1      <= box_lo.x;
                cs2      <= box_hi.x;
                fin_word <= result_word_t'(cmd_word);   // keeps the WRITE state (b.z)
                acc_rd   <= '1;
                sw_cnt   <= '0;
                state    <= S_RW_SWEEP;
              end
              OP_ROUTE, OP_EXT_INIT, OP_EXTEND: begin
                src          <= cmd_word.a;
                tgt          <= cmd_word.b;
                multi        <= (cmd_word.op != OP_ROUTE);
                failed       <= 1'b0;
                etch_pending <= 1'b0;
                sw_cnt       <= '0;
                state        <= (cmd_word.op == OP_EXTEND) ? S_WTGT_SET : S_CLEART0;
              end
              default: ;
            endcase
          end

        S_RW_SWEEP: begin
          sw_cnt <= sw_cnt + 1'b1;
          if (sw_cnt == (ZW+1)'(LMAX)) begin
            drain <= '0;
            state <= (op == OP_READ) ? S_RW_DRAIN : S_IDLE;
          end
        end

        S_RW_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 2'd2) begin
            fin_word <= '{kind: RS_READ, a: '0, b: point_t'(acc_rd)};
            state    <= S_RES;
          end
        end

        S_RES, S_FINISH:
          if (res_ready) state <= S_IDLE;

        S_CLEART0: begin
          sw_cnt <= sw_cnt + 1'b1;
          if (sw_cnt == (ZW+1)'(LMAX)) state <= S_WSRC_SET;
        end

        S_WSRC_SET: begin
          rs1 <= src.y; rs2 <= src.y; cs1 <= src.x; cs2 <= src.x;
          state <= S_WSRC;
        end

        S_WSRC:
          if (cmd_d == PE_WRITE) state <= S_WTGT_SET;

        S_WTGT_SET: begin
          rs1 <= tgt.y; rs2 <= tgt.y; cs1 <= tgt.x; cs2 <= tgt.x;
          state <= S_WTGT;
        end

        S_WTGT:
          if (cmd_d == PE_WRITE) state <= S_EXP_WAIT0;

        S_EXP_WAIT0:
          if (cmd_d == PE_EXPAND) state <= S_EXP;

        S_EXP:
          // Evaluate a sweep when the status of its last layer arrives. Layer
          // 0 of the following sweep is already in flight: after a hit it
          // only expands further gridpoints that CLEARX removes; after a
          // sweep without progress it cannot change anything either.
          if (sweep_end) begin
            if (hit_now) begin
              p        <= tgt;
              seg_a    <= tgt;
              bt_first <= 1'b1;
              bt_steps <= '0;
              state    <= S_BT_SET;
            end else if (!prog_now) begin
              if (ETCHING && !tag2.etch) begin
                etch_pending <= 1'b1;
                state        <= S_EXP_WAIT0;
              end else begin
                failed <= 1'b1;
                sw_cnt <= '0;
                state  <= S_CLEARX;
              end
            end
          end

        S_BT_SET: begin
          rs1 <= p.y; rs2 <= p.y; cs1 <= p.x; cs2 <= p.x;
          state <= S_BT_READ;
        end

        S_BT_READ:
          if (cmd_d == PE_READ) state <= S_BT_RWAIT;

        S_BT_RWAIT:
          if (tag2.rd) begin
            rd_cell <= cell_t'(status);
            state   <= S_BT_DECIDE;
          end

        S_BT_DECIDE: begin
          seg_word  <= '{kind: RS_SEGMENT, a: seg_a, b: p};
          etch_word <= '{kind: RS_ETCH, a: p, b: p};
          bt_steps  <= bt_steps + 1'b1;
          if (rd_cell.st == ST_TRACED) begin
            seg_pend  <= 1'b1;
            etch_pend <= 1'b0;
            path_done <= 1'b1;
            state     <= S_BT_EMIT;
          end else if (is_xstate(rd_cell.st) && bt_steps < 32'(BT_LIMIT)) begin
            seg_pend  <= !bt_first && (rd_cell.st != dir_prev);
            etch_pend <= rd_cell.etched;
            path_done <= 1'b0;
            if (!bt_first && (rd_cell.st != dir_prev)) seg_a <= p;
            state     <= S_BT_EMIT;
          end else begin
            failed <= 1'b1;
            sw_cnt <= '0;
            state  <= S_CLEARX;
          end
        end

        S_BT_EMIT:
          if (seg_pend || etch_pend) begin
            if (res_ready) begin
              if (seg_pend) seg_pend  <= 1'b0;
              else          etch_pend <= 1'b0;
            end
          end else if (path_done) begin
            sw_cnt <= '0;
            state  <= S_CLEARX;
          end else begin
            state <= S_BT_WRITE;
          end

        S_BT_WRITE:
          if (cmd_d == PE_WRITE) begin
            p        <= step(p, rd_cell.st);
            dir_prev <= rd_cell.st;
            bt_first <= 1'b0;
            state    <= S_BT_SET;
          end

        S_CLEARX: begin
          sw_cnt <= sw_cnt + 1'b1;
          if (sw_cnt == (ZW+1)'(LMAX)) begin
            sw_cnt <= '0;
            state  <= (op == OP_ROUTE) ? S_CLEART1 : S_FINISH;
          end
          fin_word <= '{kind: (failed ? RS_FAIL : RS_DONE), a: '0, b: '0};
        end

        S_CLEART1: begin
          sw_cnt <= sw_cnt + 1'b1;
          if (sw_cnt == (ZW+1)'(LMAX)) state <= S_FINISH;
        end

        default: state <= S_IDLE;
      endcase

    end
  end

  // A result word, once offered, stays unchanged until it is taken.
  a_res_stable: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid && !res_ready |=> res_valid && $stable(res_word));
  // Every run of EXPAND commands starts at layer 0, so each sweep is one
  // breadth-first step.
  a_sweep_start: assert property (@(posedge clk) disable iff (!rst_n)
    pe_cmd == PE_EXPAND && $past(pe_cmd) != PE_EXPAND |-> layer_first);
  // Etching is only ever enabled together with EXPAND.
  a_etch_expand: assert property (@(posedge clk) disable iff (!rst_n)
    pe_etch_en |-> pe_cmd == PE_EXPAND);

  initial assert (GRID_X <= (1 << CW) && GRID_Y <= (1 << CW) && LAYERS >= 2 && LAYERS <= 16)
    else $error("grid too large for the command word");

endmodule
