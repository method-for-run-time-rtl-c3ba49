// cycle_timer: the profiler's free-running clock-cycle counter.
//
// The original method keeps the cycles between loop iterations in a counter;
// here one shared counter timestamps every monitored branch and the loop
// table subtracts consecutive timestamps of the same loop. The counter
// advances by one on each clock edge while enable is high, holds while it is
// low, restarts at zero on clear and wraps at 2^TS_W. Reset (active-low,
// synchronous) sets it to zero. Sharing one counter is this design's choice.
module cycle_timer #(
  parameter int unsigned TS_W = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            enable,
  output logic [TS_W-1:0] now
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear)
      now <= '0;
    else if (enable)
      now <= now + 1'b1;
  end

endmodule
