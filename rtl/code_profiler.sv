// code_profiler: non-intrusive hardware loop profiler.
//
// The profiler sits beside the processor and watches every instruction the
// processor fetches from its program block RAM. It needs no change to the
// program or the compiler and costs the processor no cycles. Each fetched
// unconditional backward branch ends one iteration of a loop; the profiler
// records, for up to NUM_LOOPS loops, where the loop starts, how big its body
// is, how many times it iterated and the fewest clock cycles one iteration
// took. When the table is full a new loop replaces the entry of lowest weight
// (count x minimum iteration time); the entry of highest weight is offered as
// the best candidate for hardware acceleration. The monitored instruction is
// a parameter so the same block can count function calls instead.
//
// Pipeline: the snooped fetch (snoop_valid/addr/instr) is registered, decoded
// in the next cycle and written into the loop table at the end of that cycle,
// so table and registers show a branch two clock edges after it is
// presented. One instruction per cycle is accepted without stalls.
// Processor interface: see profiler_regs (enable, clear, read-out).
// From the original method: the loop detection, the count, the minimum-time rule,
// ten loops, weight-based replacement and the parameterised instruction.
// This design's own: the weight formula, field widths, pipeline and bus.
module code_profiler
  import profiler_pkg::*;
#(
  parameter int unsigned NUM_LOOPS     = 10,
  parameter instr_t      MATCH_MASK    = B_MASK,
  parameter instr_t      MATCH_VALUE   = B_VALUE,
  parameter bit          BACKWARD_ONLY = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        snoop_valid,
  input  addr_t       snoop_addr,
  input  instr_t      snoop_instr,
  input  logic        bus_sel,
  input  logic        bus_we,
  input  logic [7:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        best_valid,
  output logic [7:0]  best_index
);

  logic        s_valid;
  addr_t       s_addr;
  instr_t      s_instr;
  logic        enable, clear;
  logic        hit;
  addr_t       target;
  size_t       body_size;
  ts_t         now;
  loop_entry_t entries [NUM_LOOPS];
  weight_t     weights [NUM_LOOPS];
  weight_t     best_weight, threshold;
  logic        ev_update, ev_alloc, ev_replace, ev_newmin;

  // Snoop register: decouples the profiler from the fetch path.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      s_addr  <= '0;
      s_instr <= '0;
    end else begin
      s_valid <= snoop_valid && enable;
      s_addr  <= snoop_addr;
      s_instr <= snoop_instr;
    end
  end

  branch_decoder #(
    .MATCH_MASK   (MATCH_MASK),
    .MATCH_VALUE  (MATCH_VALUE),
    .BACKWARD_ONLY(BACKWARD_ONLY)
  ) u_dec (
    .valid    (s_valid && !clear),
    .addr     (s_addr),
    .instr    (s_instr),
    .hit      (hit),
    .target   (target),
    .body_size(body_size)
  );

  cycle_timer #(.TS_W(TS_W)) u_timer (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (clear),
    .enable(enable),
    .now   (now)
  );

  loop_table #(.NUM_LOOPS(NUM_LOOPS)) u_table (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (clear),
    .hit        (hit),
    .target     (target),
    .body_size  (body_size),
    .now        (now),
    .entries    (entries),
    .weights    (weights),
    .best_valid (best_valid),
    .best_index (best_index),
    .best_weight(best_weight),
    .threshold  (threshold),
    .ev_update  (ev_update),
    .ev_alloc   (ev_alloc),
    .ev_replace (ev_replace),
    .ev_newmin  (ev_newmin)
  );

  profiler_regs #(.NUM_LOOPS(NUM_LOOPS)) u_regs (
    .clk        (clk),
    .rst_n      (rst_n),
    .bus_sel    (bus_sel),
    .bus_we     (bus_we),
    .bus_addr   (bus_addr),
    .bus_wdata  (bus_wdata),
    .bus_rdata  (bus_rdata),
    .enable     (enable),
    .clear      (clear),
    .entries    (entries),
    .best_valid (best_valid),
    .best_index (best_index),
    .best_weight(best_weight),
    .threshold  (threshold),
    .now        (now)
  );

endmodule
