// l4_cycle_counter: command cycle counter of the L4 accelerator.
//
// Counts accelerator clock cycles from the beginning to the end of a routing
// command, so that the host can separate routing time from interface time.
// start clears the count to 1 (the start cycle itself) and begins counting;
// stop ends counting (the stop cycle is not counted) and the count then
// holds until the next start. The
// published design states only what is counted; the start/stop interface and
// the saturating 28-bit width (the count travels in a 32-bit result word) are
// this design's choices.
//
// Timing: count is a register; it shows the start cycle one clock after start.
module l4_cycle_counter
  import l4_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            stop,
  output logic [CNTW-1:0] count
);

  logic running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      count   <= '0;
    end else if (start) begin
      running <= 1'b1;
      count   <= CNTW'(1);
    end else if (running) begin
      if (stop)                 running <= 1'b0;
      else if (count != '1)     count   <= count + 1'b1;
    end
  end

endmodule
