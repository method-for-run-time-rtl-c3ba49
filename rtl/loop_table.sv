// loop_table: the profiler's table of tracked loops.
//
// Each entry holds a loop start address, body size, iteration count, the
// shortest interval (in clock cycles) seen between two iterations, and the
// timer value of the latest iteration. When the decoder reports a monitored
// branch (hit), the target is compared with every valid entry at once:
//   * match: the count is incremented (saturating); the interval since the
//     previous iteration is computed and stored as the new minimum if it is
//     the same or less than the stored one, otherwise skipped - this update
//     rule is the original method's; the timestamp is refreshed.
//   * no match: the loop is written into the entry chosen by weight_unit (a
//     free entry, else the one of lowest weight = count x min time), with
//     count 1 and no measured time yet.
// Ten entries and replacement by a weight factor follow the original method; the
// weight formula, the field widths and the tie rules are this design's.
//
// Timing: the update happens at the clock edge where hit is high, so a
// branch presented every cycle is handled every cycle. Outputs of
// weight_unit (weights, best, threshold) are combinational from the table.
// ev_* are registered one-cycle pulses that report what the last update did.
// clear empties the table; reset is active-low and synchronous.
module loop_table
  import profiler_pkg::*;
#(
  parameter int unsigned NUM_LOOPS = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        hit,
  input  addr_t       target,
  input  size_t       body_size,
  input  ts_t         now,
  output loop_entry_t entries [NUM_LOOPS],
  output weight_t     weights [NUM_LOOPS],
  output logic        best_valid,
  output logic [7:0]  best_index,
  output weight_t     best_weight,
  output weight_t     threshold,
  output logic        ev_update,   // an existing entry was updated
  output logic        ev_alloc,    // a new loop took a free entry
  output logic        ev_replace,  // a new loop displaced a tracked one
  output logic        ev_newmin    // an update lowered or kept the minimum time
);

  localparam int unsigned IW = (NUM_LOOPS > 1) ? $clog2(NUM_LOOPS) : 1;

  logic [7:0]    victim;
  logic [IW-1:0] vidx;
  logic          match;
  logic [IW-1:0] match_idx;
  ts_t        dt;
  time_t      dt_sat;

  weight_unit #(.NUM_LOOPS(NUM_LOOPS)) u_weight (
    .entries    (entries),
    .weights    (weights),
    .victim     (victim),
    .threshold  (threshold),
    .best_valid (best_valid),
    .best_index (best_index),
    .best_weight(best_weight)
  );

  always_comb begin
    match     = 1'b0;
    match_idx = '0;
    for (int i = 0; i < NUM_LOOPS; i++) begin
      if (!match && entries[i].valid && entries[i].start_addr == target) begin
        match     = 1'b1;
        match_idx = IW'(i);
      end
    end
    vidx   = victim[IW-1:0];
    dt     = now - entries[match_idx].last_ts;
    dt_sat = (dt > ts_t'({TIME_W{1'b1}})) ? '1 : dt[TIME_W-1:0];
  end

  always_ff @(posedge clk) begin
    ev_update  <= 1'b0;
    ev_alloc   <= 1'b0;
    ev_replace <= 1'b0;
    ev_newmin  <= 1'b0;
    if (!rst_n || clear) begin
      for (int i = 0; i < NUM_LOOPS; i++)
        entries[i] <= '0;
    end else if (hit) begin
      if (match) begin
        ev_update <= 1'b1;
        if (entries[match_idx].count != '1)
          entries[match_idx].count <= entries[match_idx].count + 1'b1;
        if (!entries[match_idx].measured || dt_sat <= entries[match_idx].min_time) begin
          entries[match_idx].min_time <= dt_sat;
          entries[match_idx].measured <= 1'b1;
          ev_newmin <= 1'b1;
        end
        entries[match_idx].last_ts <= now;
      end else begin
        ev_alloc   <= !entries[vidx].valid;
        ev_replace <= entries[vidx].valid;
        entries[vidx] <= '{valid: 1'b1, measured: 1'b0, start_addr: target,
                             size: body_size, count: count_t'(1),
                             min_time: '0, last_ts: now};
      end
    end
  end

endmodule
