// tb_l4_control_unit: testbench of the control unit, with etching disabled.
//
// The control unit (ETCHING = 0) is wired to two range decoders and a 5 x 4
// PE array with 2 layers. Directed routes check: a straight route returns one
// segment and needs exactly d expansion sweeps for distance d; a route with a
// via and a bend returns the expected segment endpoints; a route through a
// complete wall is refused (no etching in this configuration) and leaves the
// grid as it was apart from the source; the cycle count carried by the final
// word equals the cycles counted by the testbench from command acceptance to
// the final word. A checker also verifies the broadcast protocol on every
// cycle: EXPAND sweeps start at layer 0 and cover all layers, the layer flags
// match the testbench's own layer counter, etch enable is never raised, and
// no command reaches the array while the unit is idle.
module tb_l4_control_unit;
  import l4_pkg::*;

  localparam int GX = 5, GY = 4, L = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid, cmd_ready, res_valid, res_ready;
  cmd_word_t cmd_word;
  result_word_t res_word;
  pe_cmd_e pe_cmd;
  cell_state_e pe_state_in;
  logic pe_etch_en, layer_first, layer_last;
  logic [CELLW-1:0] status;
  logic [CW-1:0] rs1, rs2, cs1, cs2;
  logic [GY-1:0] row_sel;
  logic [GX-1:0] col_sel;

  l4_control_unit #(.GRID_X(GX), .GRID_Y(GY), .LAYERS(L), .ETCHING(1'b0)) dut (.*);
  l4_range_decoder #(.N(GY)) u_rd (.clk, .rst_n, .lo(rs1), .hi(rs2), .sel(row_sel));
  l4_range_decoder #(.N(GX)) u_cd (.clk, .rst_n, .lo(cs1), .hi(cs2), .sel(col_sel));
  l4_pe_array #(.GRID_X(GX), .GRID_Y(GY), .LAYERS(L)) u_arr (
    .clk, .rst_n, .cmd(pe_cmd), .state_in(pe_state_in), .etch_en(pe_etch_en),
    .layer_first, .layer_last, .row_sel, .col_sel, .status);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- protocol checker
  int tb_layer = 0, run_len = 0, full_sweeps = 0, proto_bad = 0, cyc = 0;
  pe_cmd_e prev_cmd = PE_NOP;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    // array layer in the cycle that just ended
    if (layer_first != (tb_layer == 0) || layer_last != (tb_layer == L - 1)) proto_bad++;
    if (pe_cmd == PE_EXPAND) begin
      if (prev_cmd != PE_EXPAND && tb_layer != 0) proto_bad++;
      run_len++;
      if (tb_layer == L - 1) full_sweeps++;
    end else begin
      run_len = 0;
    end
    if (pe_etch_en) proto_bad++;
    prev_cmd = pe_cmd;
    tb_layer = (tb_layer + 1) % L;
  end
  // nothing is broadcast while idle (the command register lags the state by one cycle)
  logic idle_q;
  always @(posedge clk) begin
    if (rst_n && idle_q && cmd_ready && pe_cmd != PE_NOP) proto_bad++;
    idle_q <= cmd_ready;
  end

  // ---------------------------------------------------------------- host I/O
  int t_accept;
  task automatic send(host_op_e op, point_t a, point_t b);
    @(negedge clk);
    cmd_valid = 1'b1;
    cmd_word  = '{op: op, a: a, b: b};
    do @(posedge clk); while (!cmd_ready);
    t_accept = cyc;
    @(negedge clk) cmd_valid = 1'b0;
  endtask

  task automatic recv(output result_word_t w, output int t);
    do @(posedge clk); while (!res_valid);
    w = res_word;
    t = cyc;
  endtask

  function automatic point_t pt(int x, int y, int z);
    return '{x: CW'(x), y: CW'(y), z: ZW'(z)};
  endfunction

  task automatic route(point_t a, point_t b, output result_word_t segs [$], output logic ok,
                       output int cycles_word, output int cycles_tb);
    result_word_t w;
    int t;
    segs = {};
    send(OP_ROUTE, a, b);
    do begin
      recv(w, t);
      if (w.kind == RS_SEGMENT) segs.push_back(w);
      check("no etch report with etching disabled", w.kind != RS_ETCH);
    end while (!(w.kind inside {RS_DONE, RS_FAIL}));
    ok = (w.kind == RS_DONE);
    cycles_word = int'(w[CNTW-1:0]);
    cycles_tb = t - t_accept;
  endtask

  task automatic read_pt(point_t a, output cell_t c);
    result_word_t w;
    int t;
    send(OP_SELECT, a, a);
    send(OP_READ, '0, '0);
    recv(w, t);
    c = cell_t'(w.b[CELLW-1:0]);
  endtask

  initial begin
    result_word_t segs [$];
    logic ok;
    int cw, ct, s0;
    cell_t c;
    cmd_valid = 0; res_ready = 1; cmd_word = '0; idle_q = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // straight route, distance 4: one segment, four expansion sweeps
    s0 = full_sweeps;
    route(pt(0, 1, 0), pt(4, 1, 0), segs, ok, cw, ct);
    check("straight route done", ok);
    check("one segment", segs.size() == 1);
    if (segs.size() == 1)
      check("segment target to source", segs[0].a == pt(4, 1, 0) && segs[0].b == pt(0, 1, 0));
    check("four sweeps for distance four", full_sweeps - s0 == 4);
    check("cycle count matches", cw == ct);
    $display("straight route: %0d cycles", cw);
    read_pt(pt(2, 1, 0), c);
    check("path point blocked", c.st == ST_BLOCKED);
    read_pt(pt(0, 1, 0), c);
    check("source blocked", c.st == ST_BLOCKED);
    read_pt(pt(2, 2, 0), c);
    check("expanded point cleaned up", c.st == ST_EMPTY);

    // via and bend: from (0,0,0) to (2,3,1) around the blocked row y = 1 on layer 0
    route(pt(0, 3, 0), pt(3, 3, 1), segs, ok, cw, ct);
    check("route with via done", ok);
    begin
      int len = 0, vias = 0;
      foreach (segs[i]) begin
        len += (segs[i].a.x > segs[i].b.x ? segs[i].a.x - segs[i].b.x : segs[i].b.x - segs[i].a.x)
             + (segs[i].a.y > segs[i].b.y ? segs[i].a.y - segs[i].b.y : segs[i].b.y - segs[i].a.y)
             + (segs[i].a.z > segs[i].b.z ? segs[i].a.z - segs[i].b.z : segs[i].b.z - segs[i].a.z);
        if (segs[i].a.z != segs[i].b.z) vias++;
      end
      check("shortest length 4 with one via", len == 4 && vias == 1);
      check("chain starts at the target", segs.size() > 0 && segs[0].a == pt(3, 3, 1));
      check("chain ends at the source", segs.size() > 0 && segs[segs.size()-1].b == pt(0, 3, 0));
    end
    check("cycle count matches", cw == ct);

    // a complete wall at x = 2 on both layers: refused without etching
    send(OP_SELECT, pt(2, 0, 0), pt(2, GY - 1, L - 1));
    send(OP_WRITE, '0, '{x: '0, y: '0, z: ZW'(ST_BLOCKED)});
    route(pt(0, 0, 1), pt(4, 0, 1), segs, ok, cw, ct);
    check("walled route refused", !ok && segs.size() == 0);
    check("cycle count matches", cw == ct);
    read_pt(pt(0, 0, 1), c);
    check("refused source blocked", c.st == ST_BLOCKED);
    read_pt(pt(4, 0, 1), c);
    check("refused target empty", c.st == ST_EMPTY);
    read_pt(pt(1, 0, 1), c);
    check("no expansion left behind", c.st == ST_EMPTY && !c.etched);
    read_pt(pt(2, 2, 1), c);
    check("wall untouched", c.st == ST_BLOCKED && !c.etched);

    repeat (5) @(posedge clk);
    check("broadcast protocol", proto_bad == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
