// weight_unit: scores the tracked loops and picks the replacement victim and
// the best acceleration candidate.
//
// The original method chooses candidates by combining how often a loop runs with
// how long one iteration takes, and uses a weight factor both to replace less
// interesting loops and as a threshold for the next candidate. The exact cost
// function is not given; this unit uses weight = iteration count x minimum
// cycles per iteration, an estimate of the cycles the loop costs in software,
// and 0 for an entry whose iteration time is not yet measured.
//   victim    : first free entry; if none, the lowest-weight entry
//               (lowest index on a tie)
//   threshold : weight a new candidate displaces (0 while a free entry exists)
//   best      : highest-weight measured entry (lowest index on a tie);
//               best_valid is low when no entry has a non-zero weight
// Purely combinational.
module weight_unit
  import profiler_pkg::*;
#(
  parameter int unsigned NUM_LOOPS = 10
) (
  input  loop_entry_t         entries [NUM_LOOPS],
  output weight_t             weights [NUM_LOOPS],
  output logic [7:0]          victim,
  output weight_t             threshold,
  output logic                best_valid,
  output logic [7:0]          best_index,
  output weight_t             best_weight
);

  logic    found_free;
  weight_t min_w;

  always_comb begin
    for (int i = 0; i < NUM_LOOPS; i++) begin
      if (entries[i].valid && entries[i].measured)
        weights[i] = weight_t'(entries[i].count) * weight_t'(entries[i].min_time);
      else
        weights[i] = '0;
    end

    found_free = 1'b0;
    victim     = '0;
    min_w      = '1;
    for (int i = 0; i < NUM_LOOPS; i++) begin
      if (!found_free) begin
        if (!entries[i].valid) begin
          found_free = 1'b1;
          victim     = 8'(i);
          min_w      = '0;
        end else if (weights[i] < min_w) begin
          victim = 8'(i);
          min_w  = weights[i];
        end
      end
    end
    threshold = min_w;

    best_valid  = 1'b0;
    best_index  = '0;
    best_weight = '0;
    for (int i = 0; i < NUM_LOOPS; i++) begin
      if (weights[i] > best_weight) begin
        best_valid  = 1'b1;
        best_index  = 8'(i);
        best_weight = weights[i];
      end
    end
  end

endmodule
