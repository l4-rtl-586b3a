// tb_l4_cycle_counter: self-checking testbench of the command cycle counter.
//
// Starts the counter, lets it run a random number of cycles, stops it and
// checks that the count equals the number of cycles from the start cycle up
// to (not including) the stop cycle, that it holds afterwards, and that a new
// start restarts it.
module tb_l4_cycle_counter;
  import l4_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, stop;
  logic [CNTW-1:0] count;

  l4_cycle_counter dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    start = 0; stop = 0;
    repeat (2) @(posedge clk);
    check("reset", int'(count), 0);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      int n;
      n = $urandom_range(1, 300);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      repeat (n - 1) @(negedge clk);
      stop = 1;                       // start cycle + (n-1) cycles counted
      @(negedge clk) stop = 0;
      check("count", int'(count), n);
      repeat ($urandom_range(1, 20)) @(negedge clk);
      check("hold", int'(count), n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
