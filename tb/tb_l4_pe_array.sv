// tb_l4_pe_array: self-checking testbench of the PE array.
//
// A 5 x 4 array with 3 layers is driven with random broadcast commands and
// random row/column select vectors. The testbench keeps its own model of the
// whole grid (states indexed [x][y][z], neighbours found by coordinate: east
// is x+1, north is y+1, up is z+1, down is the previous layer as it was
// before that cycle's update) and checks the registered, ANDed status
// one clock after each command. EXPAND is issued in whole sweeps starting at
// layer 0 from TRACED seeds, so the wavefront spreads through the array; a
// final READ of every gridpoint compares the whole grid. Counts expansions
// arriving from each of the six directions and fails if one never occurs.
module tb_l4_pe_array;
  import l4_pkg::*;

  localparam int GX = 5, GY = 4, L = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  pe_cmd_e cmd;
  cell_state_e state_in;
  logic etch_en, layer_first, layer_last;
  logic [GY-1:0] row_sel;
  logic [GX-1:0] col_sel;
  logic [CELLW-1:0] status;

  l4_pe_array #(.GRID_X(GX), .GRID_Y(GY), .LAYERS(L)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_dir [6];

  cell_t g [GX][GY][L];
  logic  prev_src [GX][GY];   // expanded flag of the previous layer before its update
  int    cur;

  function automatic logic is_x(cell_t c);
    return c.st inside {ST_XE, ST_XW, ST_XN, ST_XS, ST_XU, ST_XD};
  endfunction
  function automatic logic srcf(cell_t c);
    return is_x(c) || c.st == ST_TRACED;
  endfunction

  // one cycle of the model on layer cur; returns the expected status
  function automatic logic [CELLW-1:0] model_cycle();
    cell_t nx [GX][GY];
    logic [CELLW-1:0] st = '1;
    for (int x = 0; x < GX; x++)
      for (int y = 0; y < GY; y++) begin
        cell_t c = g[x][y][cur];
        logic s = row_sel[y] && col_sel[x];
        logic e  = (x < GX - 1) && srcf(g[x+1][y][cur]);
        logic w  = (x > 0)      && srcf(g[x-1][y][cur]);
        logic n  = (y < GY - 1) && srcf(g[x][y+1][cur]);
        logic so = (y > 0)      && srcf(g[x][y-1][cur]);
        logic u  = (cur < L - 1) && srcf(g[x][y][cur+1]);
        logic d  = (cur > 0)     && prev_src[x][y];
        nx[x][y] = c;
        case (cmd)
          PE_READ:  if (s) st &= c;
          PE_WRITE: if (s) nx[x][y] = '{1'b0, state_in};
          PE_CLEARX: if (is_x(c)) nx[x][y] = '{1'b0, c.etched ? ST_BLOCKED : ST_EMPTY};
          PE_CLEART: if (c.st == ST_TRACED) nx[x][y] = '{1'b0, ST_BLOCKED};
          PE_EXPAND: begin
            if ((c.st == ST_EMPTY || (etch_en && c.st == ST_BLOCKED)) && (e | w | n | so | u | d)) begin
              nx[x][y].etched = (c.st == ST_BLOCKED);
              nx[x][y].st = e ? ST_XE : w ? ST_XW : n ? ST_XN : so ? ST_XS : u ? ST_XU : ST_XD;
              st[1] = 1'b0;
              n_dir[int'(nx[x][y].st) - 1]++;
            end
            if (s && is_x(nx[x][y])) st[0] = 1'b0;
          end
          default: ;
        endcase
      end
    for (int x = 0; x < GX; x++)
      for (int y = 0; y < GY; y++) begin
        prev_src[x][y] = srcf(g[x][y][cur]);
        g[x][y][cur]   = nx[x][y];
      end
    return st;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one cycle: inputs are set at the negedge, the model is advanced,
  // and the status is compared one clock later
  task automatic drive(pe_cmd_e c, cell_state_e s, logic et, logic [GY-1:0] rs, logic [GX-1:0] cs);
    logic [CELLW-1:0] e;
    cmd = c; state_in = s; etch_en = et; row_sel = rs; col_sel = cs;
    layer_first = (cur == 0); layer_last = (cur == L - 1);
    e = model_cycle();
    @(posedge clk); #1;
    checks++;
    if (status !== e) begin
      failures++;
      $display("FAIL status %b expected %b (cmd %s layer %0d)", status, e, c.name(), cur);
    end
    cur = (cur + 1) % L;
    @(negedge clk);
  endtask

  initial begin
    cmd = PE_NOP; state_in = ST_EMPTY; etch_en = 0; row_sel = '0; col_sel = '0;
    for (int i = 0; i < 6; i++) n_dir[i] = 0;
    layer_first = 1; layer_last = 0;
    for (int x = 0; x < GX; x++) for (int y = 0; y < GY; y++) for (int z = 0; z < L; z++)
      begin g[x][y][z] = '{1'b0, ST_EMPTY}; prev_src[x][y] = 1'b0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    cur = 0;
    for (int round = 0; round < 40; round++) begin
      // random obstacles and seeds by random rectangles
      repeat (6) begin
        cell_state_e s;
        int k;
        k = $urandom_range(0, 9);
        s = (k < 4) ? ST_BLOCKED : (k < 5) ? ST_UNETCH : (k < 6) ? ST_TRACED : ST_EMPTY;
        drive(PE_WRITE, s, 0, GY'($urandom), GX'($urandom));
      end
      // seed one TRACED point on layer 1 so up/down expansion appears
      while (cur != 1) drive(PE_NOP, ST_EMPTY, 0, '0, '0);
      drive(PE_WRITE, ST_TRACED, 0, GY'(1) << $urandom_range(0, GY - 1),
            GX'(1) << $urandom_range(0, GX - 1));
      // whole expansion sweeps, one in four with etching, random target selection
      while (cur != 0) drive(PE_NOP, ST_EMPTY, 0, '0, '0);
      repeat ($urandom_range(1, 5)) begin
        logic et;
        logic [GY-1:0] rs;
        logic [GX-1:0] cs;
        et = ($urandom_range(0, 3) == 0);
        rs = GY'(1) << $urandom_range(0, GY - 1);
        cs = GX'(1) << $urandom_range(0, GX - 1);
        repeat (L) drive(PE_EXPAND, ST_EMPTY, et, rs, cs);
      end
      // reads of random regions
      repeat (4) drive(PE_READ, ST_EMPTY, 0, GY'($urandom), GX'($urandom));
      // cleanup
      if ($urandom_range(0, 1)) repeat (L) drive(PE_CLEARX, ST_EMPTY, 0, '0, '0);
      if ($urandom_range(0, 3) == 0) repeat (L) drive(PE_CLEART, ST_EMPTY, 0, '0, '0);
    end
    // read back every gridpoint on its own
    for (int z0 = 0; z0 < L; z0++)
      for (int x = 0; x < GX; x++)
        for (int y = 0; y < GY; y++) begin
          while (cur != z0) drive(PE_NOP, ST_EMPTY, 0, '0, '0);
          drive(PE_READ, ST_EMPTY, 0, GY'(1) << y, GX'(1) << x);
        end
    $display("expansions from E W N S U D: %0d %0d %0d %0d %0d %0d",
             n_dir[0], n_dir[1], n_dir[2], n_dir[3], n_dir[4], n_dir[5]);
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (n_dir[i] == 0) begin failures++; $display("FAIL direction %0d never expanded", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
