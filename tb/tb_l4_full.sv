// tb_l4_full: the accelerator at its full default size (32 x 32 grid, 16
// layers, etching enabled), taken through complete routing operations.
//
// 1. "adjacent" route from (0,0,0) to (0,0,1): one via, one expansion step.
// 2. "corner" route from (0,0,0) to (31,31,15) on an empty grid: the whole
//    grid is expanded; the path must be 77 steps long.
// 3. The same corner route after two walls (x = 8 open only at y = 31,
//    x = 16 open only at y = 0, all layers) have been written with single
//    region WRITEs: the path must snake through both gaps and be as long as a
//    breadth-first search in the testbench says (139 steps).
// For each route the segment chain is checked from target to source, the
// number of expansion sweeps equals the path length, and the cycle count
// reported in the final word is printed and compared with the testbench's
// own count.
module tb_l4_full;
  import l4_pkg::*;

  localparam int GX = 32, GY = 32, L = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid, cmd_ready, res_valid, res_ready;
  cmd_word_t cmd_word;
  result_word_t res_word;

  l4_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, full_sweeps = 0;

  always @(posedge clk) begin
    cyc++;
    if (dut.pe_cmd == PE_EXPAND && dut.layer_last) full_sweeps++;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_accept;
  task automatic send(host_op_e op, point_t a, point_t b);
    @(negedge clk);
    cmd_valid = 1'b1;
    cmd_word  = '{op: op, a: a, b: b};
    do @(posedge clk); while (!cmd_ready);
    t_accept = cyc;
    @(negedge clk) cmd_valid = 1'b0;
  endtask

  function automatic point_t pt(int x, int y, int z);
    return '{x: CW'(x), y: CW'(y), z: ZW'(z)};
  endfunction

  logic blocked [GX][GY][L];

  function automatic int bfs(point_t s, point_t t);
    int dd [GX][GY][L];
    point_t q [$];
    for (int x = 0; x < GX; x++) for (int y = 0; y < GY; y++) for (int z = 0; z < L; z++)
      dd[x][y][z] = -1;
    dd[s.x][s.y][s.z] = 0;
    q.push_back(s);
    while (q.size() > 0) begin
      point_t c = q.pop_front();
      for (int k = 0; k < 6; k++) begin
        int nx = c.x + ((k == 0) ? 1 : (k == 1) ? -1 : 0);
        int ny = c.y + ((k == 2) ? 1 : (k == 3) ? -1 : 0);
        int nz = c.z + ((k == 4) ? 1 : (k == 5) ? -1 : 0);
        if (nx < 0 || nx >= GX || ny < 0 || ny >= GY || nz < 0 || nz >= L) continue;
        if (dd[nx][ny][nz] >= 0 || blocked[nx][ny][nz]) continue;
        dd[nx][ny][nz] = dd[c.x][c.y][c.z] + 1;
        q.push_back(pt(nx, ny, nz));
      end
    end
    return dd[t.x][t.y][t.z];
  endfunction

  task automatic route(string name, point_t s, point_t t);
    result_word_t w;
    point_t cur;
    int len = 0, nseg = 0, exp_len, s0, t_done;
    exp_len = bfs(s, t);
    s0 = full_sweeps;
    send(OP_ROUTE, s, t);
    cur = t;
    res_ready = 1'b1;
    do begin
      do @(posedge clk); while (!res_valid);
      w = res_word;
      if (w.kind == RS_SEGMENT) begin
        int nd = (w.a.x != w.b.x) + (w.a.y != w.b.y) + (w.a.z != w.b.z);
        check("segment chained and straight", w.a == cur && nd == 1);
        len += (w.a.x > w.b.x ? w.a.x - w.b.x : w.b.x - w.a.x)
             + (w.a.y > w.b.y ? w.a.y - w.b.y : w.b.y - w.a.y)
             + (w.a.z > w.b.z ? w.a.z - w.b.z : w.b.z - w.a.z);
        cur = w.b;
        nseg++;
      end
    end while (!(w.kind inside {RS_DONE, RS_FAIL}));
    t_done = cyc;
    check({name, " completed"}, w.kind == RS_DONE);
    check({name, " ends at the source"}, cur == s);
    check({name, " shortest length"}, len == exp_len);
    check({name, " one expansion sweep per step"}, full_sweeps - s0 == exp_len);
    check({name, " cycle count"}, int'(w[CNTW-1:0]) == t_done - t_accept);
    $display("%s: length %0d (expected %0d), %0d segments, %0d cycles", name, len, exp_len,
             nseg, int'(w[CNTW-1:0]));
    // the path is now an obstacle
    cur = t;
  endtask

  initial begin
    cmd_valid = 0; res_ready = 1; cmd_word = '0;
    for (int x = 0; x < GX; x++) for (int y = 0; y < GY; y++) for (int z = 0; z < L; z++)
      blocked[x][y][z] = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    route("adjacent", pt(0, 0, 0), pt(0, 0, 1));
    blocked[0][0][0] = 1'b1; blocked[0][0][1] = 1'b1;
    // clear the grid for the corner route
    send(OP_SELECT, pt(0, 0, 0), pt(GX - 1, GY - 1, L - 1));
    send(OP_WRITE, '0, '{x: '0, y: '0, z: ZW'(ST_EMPTY)});
    blocked[0][0][0] = 1'b0; blocked[0][0][1] = 1'b0;
    route("corner", pt(0, 0, 0), pt(GX - 1, GY - 1, L - 1));

    send(OP_SELECT, pt(0, 0, 0), pt(GX - 1, GY - 1, L - 1));
    send(OP_WRITE, '0, '{x: '0, y: '0, z: ZW'(ST_EMPTY)});
    send(OP_SELECT, pt(8, 0, 0), pt(8, GY - 2, L - 1));
    send(OP_WRITE, '0, '{x: '0, y: '0, z: ZW'(ST_BLOCKED)});
    send(OP_SELECT, pt(16, 1, 0), pt(16, GY - 1, L - 1));
    send(OP_WRITE, '0, '{x: '0, y: '0, z: ZW'(ST_BLOCKED)});
    for (int y = 0; y < GY - 1; y++) for (int z = 0; z < L; z++) blocked[8][y][z] = 1'b1;
    for (int y = 1; y < GY; y++) for (int z = 0; z < L; z++) blocked[16][y][z] = 1'b1;
    route("corner through two walls", pt(0, 0, 0), pt(GX - 1, GY - 1, L - 1));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
