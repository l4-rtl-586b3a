// tb_l4_range_decoder: self-checking testbench of the registered range decoder.
//
// Applies single-line, range, full and empty (lo > hi) selections and random
// ranges to a 32-line decoder and checks, one clock later, every select line
// against lo <= i <= hi computed in the testbench. Also checks the one-cycle
// latency: the lines must not change sel_prev the clock edge.
module tb_l4_range_decoder;
  import l4_pkg::*;

  localparam int N = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CW-1:0] lo, hi;
  logic [N-1:0]  sel;

  l4_range_decoder #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int l, int h);
    logic [N-1:0] exp, sel_prev;
    @(negedge clk);
    sel_prev = sel;
    lo = CW'(l); hi = CW'(h);
    #1;
    checks++;
    if (sel !== sel_prev) begin failures++; $display("FAIL decoder not registered"); end
    @(posedge clk); #1;
    for (int i = 0; i < N; i++) exp[i] = (i >= l) && (i <= h);
    checks++;
    if (sel !== exp) begin
      failures++;
      $display("FAIL lo=%0d hi=%0d sel=%h expected %h", l, h, sel, exp);
    end
  endtask

  initial begin
    lo = 0; hi = 0;
    repeat (2) @(posedge clk);
    checks++;
    if (sel !== '0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    apply(0, 0); apply(31, 31); apply(5, 5); apply(0, 31); apply(3, 17); apply(9, 2);
    for (int n = 0; n < 500; n++) apply($urandom_range(0, 31), $urandom_range(0, 31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
