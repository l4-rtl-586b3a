// tb_l4_pe: self-checking testbench of one L4 processing element.
//
// Drives a single PE (4 layers) with random broadcast commands, write states,
// etch enable, select lines and neighbour inputs, and compares XO and
// STATE_OUT every cycle with a reference model kept in the testbench (the
// model holds the layer states in an array indexed by layer, not as a ring).
// A READ of every layer at the end compares the stored states. Also checks
// that each state reaches cell 0 again after exactly LAYERS cycles (the
// state sequencer's rotation period) and counts the mechanisms exercised.
module tb_l4_pe;
  import l4_pkg::*;

  localparam int L = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  pe_cmd_e cmd;
  cell_state_e state_in;
  logic etch_en, layer_first, layer_last, rsel, csel, ei, wi, ni, si;
  logic xo;
  logic [CELLW-1:0] sto;

  l4_pe #(.LAYERS(L)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_enter = 0, n_etch = 0, n_clr_blk = 0, n_clr_emp = 0, n_cleart = 0, n_up = 0, n_dn = 0;

  cell_t model [L];
  int    cur;
  logic  m_prev;

  function automatic logic src_of(cell_t c);
    return c.st inside {ST_XE, ST_XW, ST_XN, ST_XS, ST_XU, ST_XD, ST_TRACED};
  endfunction

  function automatic cell_state_e rand_state();
    cell_state_e t [10] = '{ST_BLOCKED, ST_XE, ST_XW, ST_XN, ST_XS, ST_XU, ST_XD,
                            ST_TRACED, ST_UNETCH, ST_EMPTY};
    int k;
    k = $urandom_range(0, 12);
    return (k > 9) ? ST_EMPTY : t[k];
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // model of one cycle: returns expected sto and the next state
  task automatic model_step(output logic [CELLW-1:0] e_sto, output cell_t e_ns);
    cell_t c = model[cur];
    logic  s = rsel && csel;
    logic  up = (cur != L - 1) && src_of(model[(cur + 1) % L]);
    logic  dn = (cur != 0) && m_prev;
    e_sto = '1;
    e_ns  = c;
    case (cmd)
      PE_READ:  if (s) e_sto = c;
      PE_WRITE: if (s) e_ns = '{1'b0, state_in};
      PE_CLEARX:
        if (c.st inside {ST_XE, ST_XW, ST_XN, ST_XS, ST_XU, ST_XD})
          e_ns = c.etched ? cell_t'{1'b0, ST_BLOCKED} : cell_t'{1'b0, ST_EMPTY};
      PE_CLEART: if (c.st == ST_TRACED) e_ns = '{1'b0, ST_BLOCKED};
      PE_EXPAND: begin
        if ((c.st == ST_EMPTY || (etch_en && c.st == ST_BLOCKED)) &&
            (ei | wi | ni | si | up | dn)) begin
          e_ns.etched = (c.st == ST_BLOCKED);
          e_ns.st = ei ? ST_XE : wi ? ST_XW : ni ? ST_XN : si ? ST_XS : up ? ST_XU : ST_XD;
          e_sto[1] = 1'b0;
        end
        if (s && e_ns.st inside {ST_XE, ST_XW, ST_XN, ST_XS, ST_XU, ST_XD}) e_sto[0] = 1'b0;
      end
      default: ;
    endcase
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CELLW-1:0] e_sto;
    cell_t e_ns;
    cmd = PE_NOP; state_in = ST_EMPTY; etch_en = 0; rsel = 0; csel = 0;
    ei = 0; wi = 0; ni = 0; si = 0; layer_first = 1; layer_last = 0;
    for (int i = 0; i < L; i++) model[i] = '{1'b0, ST_EMPTY};
    cur = 0; m_prev = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // keep the layer counter aligned with the PE: it starts at layer 0 after reset
    cur = 0;
    for (int n = 0; n < 20000; n++) begin
      // drive this cycle (model and DUT are at layer cur)
      int k;
      k = $urandom_range(0, 15);
      cmd = (k < 5) ? PE_EXPAND : (k < 8) ? PE_WRITE : (k < 10) ? PE_READ :
            (k < 12) ? PE_CLEARX : (k < 13) ? PE_CLEART : PE_NOP;
      state_in = rand_state();
      etch_en  = ($urandom_range(0, 3) == 0);
      rsel = $urandom_range(0, 1); csel = $urandom_range(0, 1);
      ei = ($urandom_range(0, 5) == 0); wi = ($urandom_range(0, 5) == 0);
      ni = ($urandom_range(0, 5) == 0); si = ($urandom_range(0, 5) == 0);
      layer_first = (cur == 0); layer_last = (cur == L - 1);
      #1;
      model_step(e_sto, e_ns);
      check("xo", 32'(xo), 32'(src_of(model[cur])));
      check("sto", 32'(sto), 32'(e_sto));
      if (cmd == PE_EXPAND && !e_sto[1]) begin
        n_enter++;
        if (e_ns.etched) n_etch++;
        if (e_ns.st == ST_XU) n_up++;
        if (e_ns.st == ST_XD) n_dn++;
      end
      if (cmd == PE_CLEARX && model[cur].st != e_ns.st)
        if (e_ns.st == ST_BLOCKED) n_clr_blk++; else n_clr_emp++;
      if (cmd == PE_CLEART && model[cur].st == ST_TRACED) n_cleart++;
      @(posedge clk);
      m_prev = src_of(model[cur]);
      model[cur] = e_ns;
      cur = (cur + 1) % L;
      @(negedge clk);
    end
    // final READ of every layer
    cmd = PE_READ; rsel = 1; csel = 1; ei = 0; wi = 0; ni = 0; si = 0;
    for (int i = 0; i < L; i++) begin
      layer_first = (cur == 0); layer_last = (cur == L - 1);
      #1 check("final read", 32'(sto), 32'(model[cur]));
      @(posedge clk); cur = (cur + 1) % L; @(negedge clk);
    end
    // rotation period: write TRACED to one layer, see it come back after L cycles
    cmd = PE_WRITE; state_in = ST_TRACED; #1;
    @(posedge clk); @(negedge clk);
    cmd = PE_NOP;
    repeat (L - 1) begin @(posedge clk); @(negedge clk); end
    cmd = PE_READ; #1 check("rotation period", 32'(sto), 32'(cell_t'{1'b0, ST_TRACED}));
    $display("mechanisms: enter=%0d etched=%0d up=%0d down=%0d clearx_empty=%0d clearx_blocked=%0d cleart=%0d",
             n_enter, n_etch, n_up, n_dn, n_clr_emp, n_clr_blk, n_cleart);
    checks++;
    if (n_enter == 0 || n_etch == 0 || n_up == 0 || n_dn == 0 || n_clr_emp == 0 ||
        n_clr_blk == 0 || n_cleart == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
