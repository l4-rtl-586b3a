// tb_l4_workloads: the routing benchmarks of the published evaluation, on a
// 32 x 32 grid with 6 layers (the 8- and 16-layer versions differ only in
// LAYERS and take longer to simulate).
//
//   random two-terminal nets: 90 successive nets between random free points;
//     every net stays in the grid as an obstacle for the following ones
//   random multi-terminal nets: 40 successive nets of 2 to 5 terminals,
//     routed with ROUTE_EXTEND_INIT and ROUTE_EXTEND
//   etching experiment: 90 multi-terminal nets on one grid without ripup, so
//     congested that later nets must etch through earlier ones; terminals
//     are made UNETCHABLE; the number of etched points is printed
// The testbench acts as the host and keeps its own model of the grid. Each
// route is checked as in the end-to-end testbench: the segment chain runs
// from the target to the source or the partial net, its length is the
// breadth-first shortest distance when no etching was needed, etched points
// are exactly the obstacles on the path, and a refusal happens exactly when
// not even etching could connect. At the end the whole grid is read back and
// compared. Total and average accelerator cycles per net are printed.
module tb_l4_workloads;
  import l4_pkg::*;

  localparam int GX = 32, GY = 32, L = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid, cmd_ready, res_valid, res_ready;
  cmd_word_t cmd_word;
  result_word_t res_word;

  l4_top #(.GRID_X(GX), .GRID_Y(GY), .LAYERS(L)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- mechanisms
  int m_route = 0, m_fail = 0, m_etch_sweep = 0, m_etch_pt = 0, m_extend = 0;
  int m_cleart = 0, m_bend = 0, m_via = 0, m_region_write = 0, m_probe_hit = 0;
  int m_probe_miss = 0, m_full_sweeps = 0, cyc_count = 0;

  always @(posedge clk) begin
    cyc_count++;
    if (dut.pe_cmd == PE_EXPAND && dut.layer_first && dut.pe_etch_en) m_etch_sweep++;
    if (dut.pe_cmd == PE_EXPAND && dut.layer_last) m_full_sweeps++;
  end

  initial begin : watchdog
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- host I/O
  task automatic send(host_op_e op, point_t a, point_t b);
    @(negedge clk);
    cmd_valid = 1'b1;
    cmd_word  = '{op: op, a: a, b: b};
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk) cmd_valid = 1'b0;
  endtask

  task automatic recv(output result_word_t w);
    res_ready = 1'b1;
    do @(posedge clk); while (!res_valid);
    w = res_word;
    @(negedge clk) res_ready = ($urandom_range(0, 3) != 0);
  endtask

  function automatic point_t pt(int x, int y, int z);
    return '{x: CW'(x), y: CW'(y), z: ZW'(z)};
  endfunction

  // ---------------------------------------------------------------- grid model
  cell_state_e gm [GX][GY][L];

  task automatic write_box(point_t a, point_t b, cell_state_e s);
    send(OP_SELECT, a, b);
    send(OP_WRITE, '0, '{x: '0, y: '0, z: ZW'(s)});
    for (int x = a.x; x <= b.x; x++)
      for (int y = a.y; y <= b.y; y++)
        for (int z = a.z; z <= b.z; z++) gm[x][y][z] = s;
    m_region_write++;
  endtask

  task automatic read_box(point_t a, point_t b, output logic [CELLW-1:0] v);
    result_word_t w;
    send(OP_SELECT, a, b);
    send(OP_READ, '0, '0);
    recv(w);
    check("READ reply kind", w.kind == RS_READ);
    v = w.b[CELLW-1:0];
  endtask

  // compare every gridpoint, and one region probe, with the model
  task automatic compare_grid(string when);
    logic [CELLW-1:0] v, e;
    int bad = 0;
    for (int x = 0; x < GX; x++)
      for (int y = 0; y < GY; y++)
        for (int z = 0; z < L; z++) begin
          read_box(pt(x, y, z), pt(x, y, z), v);
          if (v != {1'b0, gm[x][y][z]}) begin
            bad++;
            $display("  (%0d,%0d,%0d) read %h model %h", x, y, z, v, gm[x][y][z]);
          end
        end
    check({"grid matches model ", when}, bad == 0);
  endtask

  task automatic probe(point_t a, point_t b);
    logic [CELLW-1:0] v, e;
    e = '1;
    for (int x = a.x; x <= b.x; x++)
      for (int y = a.y; y <= b.y; y++)
        for (int z = a.z; z <= b.z; z++) e &= {1'b0, gm[x][y][z]};
    read_box(a, b, v);
    check("region READ is AND of the states", v == e);
    if (v[3:0] == ST_EMPTY) m_probe_hit++; else m_probe_miss++;
  endtask

  // breadth-first distance from the source set to tgt; pass_blocked lets
  // BLOCKED points be crossed (reachability with etching)
  function automatic int bfs(point_t src, logic from_traced, point_t tgt, logic pass_blocked);
    int dd [GX][GY][L];
    point_t q [$];
    for (int x = 0; x < GX; x++) for (int y = 0; y < GY; y++) for (int z = 0; z < L; z++) begin
      dd[x][y][z] = -1;
      if (from_traced && gm[x][y][z] == ST_TRACED) begin
        dd[x][y][z] = 0; q.push_back(pt(x, y, z));
      end
    end
    if (!from_traced) begin dd[src.x][src.y][src.z] = 0; q.push_back(src); end
    while (q.size() > 0) begin
      point_t c = q.pop_front();
      for (int k = 0; k < 6; k++) begin
        int nx = c.x + ((k == 0) ? 1 : (k == 1) ? -1 : 0);
        int ny = c.y + ((k == 2) ? 1 : (k == 3) ? -1 : 0);
        int nz = c.z + ((k == 4) ? 1 : (k == 5) ? -1 : 0);
        if (nx < 0 || nx >= GX || ny < 0 || ny >= GY || nz < 0 || nz >= L) continue;
        if (dd[nx][ny][nz] >= 0) continue;
        if (!(gm[nx][ny][nz] == ST_EMPTY || pt(nx, ny, nz) == tgt ||
              (pass_blocked && gm[nx][ny][nz] == ST_BLOCKED))) continue;
        dd[nx][ny][nz] = dd[c.x][c.y][c.z] + 1;
        q.push_back(pt(nx, ny, nz));
      end
    end
    return dd[tgt.x][tgt.y][tgt.z];
  endfunction

  // ---------------------------------------------------------------- one route
  // returns 1 on success; etched points and path length through outputs
  task automatic route(host_op_e op, point_t src, point_t tgt,
                       output int n_etched, output int len);
    result_word_t w, segs [$];
    point_t etched [$], path [$], cur;
    int d_clean, d_etch, sweeps0;
    logic ok, from_traced;
    n_etched = 0; len = 0;
    // implicit final cleanup of a previous multi-terminal net
    if (op != OP_EXTEND)
      for (int x = 0; x < GX; x++) for (int y = 0; y < GY; y++) for (int z = 0; z < L; z++)
        if (gm[x][y][z] == ST_TRACED) begin gm[x][y][z] = ST_BLOCKED; m_cleart++; end
    from_traced = (op == OP_EXTEND);
    d_clean = bfs(src, from_traced, tgt, 1'b0);
    d_etch  = bfs(src, from_traced, tgt, 1'b1);
    sweeps0 = m_full_sweeps;
    send(op, src, tgt);
    do begin
      recv(w);
      if (w.kind == RS_SEGMENT) segs.push_back(w);
      if (w.kind == RS_ETCH) etched.push_back(w.a);
    end while (!(w.kind inside {RS_DONE, RS_FAIL}));
    ok = (w.kind == RS_DONE);
    check("route refused exactly when etching cannot connect", ok == (d_etch >= 0));
    if (!ok) begin
      m_fail++;
      if (op == OP_ROUTE) gm[src.x][src.y][src.z] = ST_BLOCKED;
      if (op == OP_EXT_INIT) gm[src.x][src.y][src.z] = ST_TRACED;
      gm[tgt.x][tgt.y][tgt.z] = ST_EMPTY;
      return;
    end
    m_route++;
    if (op == OP_EXTEND) m_extend++;
    // walk the chain of segments from the target
    cur = tgt;
    path.push_back(tgt);
    foreach (segs[i]) begin
      point_t a = segs[i].a, b = segs[i].b;
      int nd = (a.x != b.x) + (a.y != b.y) + (a.z != b.z);
      check("segment starts where the previous one ended", a == cur);
      check("segment is straight", nd == 1);
      if (a.z != b.z) m_via++;
      while (cur != b && nd == 1) begin
        if (cur.x != b.x) cur.x = (b.x > cur.x) ? cur.x + 1'b1 : cur.x - 1'b1;
        else if (cur.y != b.y) cur.y = (b.y > cur.y) ? cur.y + 1'b1 : cur.y - 1'b1;
        else cur.z = (b.z > cur.z) ? cur.z + 1'b1 : cur.z - 1'b1;
        path.push_back(cur);
        len++;
      end
    end
    if (segs.size() > 1) m_bend += segs.size() - 1;
    check("path ends at the source or on the partial net",
          (op == OP_EXTEND) ? gm[cur.x][cur.y][cur.z] == ST_TRACED : cur == src);
    if (etched.size() == 0) check("shortest path length", len == d_clean);
    else begin
      check("etching only when no clean path exists", d_clean < 0);
      check("etched path no shorter than the etching distance", len >= d_etch);
    end
    // every path point other than the ends was EMPTY, or BLOCKED and reported
    begin
      int n_blk = 0;
      for (int i = 1; i < path.size() - 1; i++) begin
        point_t p = path[i];
        logic rep = 1'b0;
        foreach (etched[j]) if (etched[j] == p) rep = 1'b1;
        check("path point was free or is reported etched",
              gm[p.x][p.y][p.z] == ST_EMPTY || (gm[p.x][p.y][p.z] == ST_BLOCKED && rep));
        if (gm[p.x][p.y][p.z] == ST_BLOCKED) n_blk++;
      end
      check("number of etched reports", n_blk == etched.size());
    end
    n_etched = etched.size();
    m_etch_pt += n_etched;
    foreach (path[i])
      gm[path[i].x][path[i].y][path[i].z] = (op == OP_ROUTE) ? ST_BLOCKED : ST_TRACED;
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    int ne, len, c0, c_two, c_multi, n_two, n_multi, c_etch, ep0;
    cmd_valid = 0; res_ready = 1; cmd_word = '0;
    for (int x = 0; x < GX; x++) for (int y = 0; y < GY; y++) for (int z = 0; z < L; z++)
      gm[x][y][z] = ST_EMPTY;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---- 90 random two-terminal nets
    c0 = cyc_count;
    n_two = 0;
    for (int r = 0; r < 90; r++) begin
      point_t a, b;
      do begin
        a = pt($urandom_range(0, GX - 1), $urandom_range(0, GY - 1), $urandom_range(0, L - 1));
        b = pt($urandom_range(0, GX - 1), $urandom_range(0, GY - 1), $urandom_range(0, L - 1));
      end while (a == b || gm[a.x][a.y][a.z] != ST_EMPTY || gm[b.x][b.y][b.z] != ST_EMPTY);
      route(OP_ROUTE, a, b, ne, len);
      n_two++;
    end
    c_two = cyc_count - c0;
    probe(pt(0, 0, 0), pt(GX - 1, 0, 0));
    compare_grid("after 90 two-terminal nets");

    // ---- 40 random multi-terminal nets of 2..5 terminals
    write_box(pt(0, 0, 0), pt(GX - 1, GY - 1, L - 1), ST_EMPTY);
    probe(pt(0, 0, 0), pt(GX - 1, GY - 1, L - 1));
    c0 = cyc_count;
    n_multi = 0;
    for (int r = 0; r < 40; r++) begin
      point_t t [5];
      int nt;
      nt = $urandom_range(2, 5);
      for (int i = 0; i < nt; i++) begin
        logic dup;
        do begin
          t[i] = pt($urandom_range(0, GX - 1), $urandom_range(0, GY - 1), $urandom_range(0, L - 1));
          dup = 1'b0;
          for (int j = 0; j < i; j++) if (t[j] == t[i]) dup = 1'b1;
        end while (gm[t[i].x][t[i].y][t[i].z] != ST_EMPTY || dup);
      end
      route(OP_EXT_INIT, t[0], t[1], ne, len);
      for (int i = 2; i < nt; i++) if (gm[t[i].x][t[i].y][t[i].z] == ST_EMPTY)
        route(OP_EXTEND, '0, t[i], ne, len);
      n_multi++;
    end
    c_multi = cyc_count - c0;
    compare_grid("after 40 multi-terminal nets");

    // ---- etching experiment: 90 multi-terminal nets on one grid, congested;
    // terminals are made UNETCHABLE once their net is complete
    write_box(pt(0, 0, 0), pt(GX - 1, GY - 1, L - 1), ST_EMPTY);
    c0 = cyc_count;
    ep0 = m_etch_pt;
    for (int r = 0; r < 90; r++) begin
      point_t t [5];
      int nt;
      nt = $urandom_range(2, 5);
      for (int i = 0; i < nt; i++) begin
        logic dup;
        do begin
          t[i] = pt($urandom_range(0, GX - 1), $urandom_range(0, GY - 1), $urandom_range(0, L - 1));
          dup = 1'b0;
          for (int j = 0; j < i; j++) if (t[j] == t[i]) dup = 1'b1;
        end while (gm[t[i].x][t[i].y][t[i].z] != ST_EMPTY || dup);
      end
      route(OP_EXT_INIT, t[0], t[1], ne, len);
      for (int i = 2; i < nt; i++) if (gm[t[i].x][t[i].y][t[i].z] == ST_EMPTY)
        route(OP_EXTEND, '0, t[i], ne, len);
      for (int i = 0; i < nt; i++) write_box(t[i], t[i], ST_UNETCH);
    end
    c_etch = cyc_count - c0;
    compare_grid("after the etching experiment");
    $display("etching experiment: 90 nets, %0d etched points, %0d cycles", m_etch_pt - ep0, c_etch);

    $display("two-terminal nets: %0d nets, %0d cycles, %0d cycles per net",
             n_two, c_two, c_two / n_two);
    $display("multi-terminal nets: %0d nets, %0d cycles, %0d cycles per net",
             n_multi, c_multi, c_multi / n_multi);
    $display("mechanisms: routes=%0d refused=%0d etch_sweeps=%0d etched_points=%0d extends=%0d",
             m_route, m_fail, m_etch_sweep, m_etch_pt, m_extend);
    check("all benchmark nets processed", n_two == 90 && n_multi == 40);
    check("ROUTE_EXTEND happened", m_extend > 0);
    check("etching happened in the congested experiment", m_etch_pt > ep0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
