// tb_weight_unit: fills the table input with random entries (free, unmeasured
// and measured, with deliberate ties) and compares weights, victim, threshold
// and best candidate with the reference model.
module tb_weight_unit;
  import profiler_pkg::*;
  import profiler_ref_pkg::*;
  localparam int N = 10;
  loop_entry_t entries [N];
  weight_t     weights [N];
  logic [7:0]  victim, best_index;
  weight_t     threshold, best_weight;
  logic        best_valid;
  int checks = 0, failures = 0;
  loop_ref ref_m;

  weight_unit #(.NUM_LOOPS(N)) dut (.entries, .weights, .victim, .threshold,
                                     .best_valid, .best_index, .best_weight);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_m = new(N);
    for (int k = 0; k < 5000; k++) begin
      int mode;
      mode = $urandom % 4;
      for (int i = 0; i < N; i++) begin
        entries[i] = '0;
        entries[i].valid    = (mode == 0) ? 1'($urandom % 2) : 1'b1;
        entries[i].measured = 1'($urandom % 4 != 0);
        entries[i].start_addr = $urandom;
        entries[i].count    = (mode == 1) ? count_t'($urandom % 3 + 1) :
                              (mode == 2) ? count_t'($urandom) : count_t'($urandom % 1000);
        entries[i].min_time = (mode == 1) ? time_t'($urandom % 3) :
                              (mode == 2) ? time_t'($urandom) : time_t'($urandom % 100);
        ref_m.valid[i]    = entries[i].valid;
        ref_m.measured[i] = entries[i].measured;
        ref_m.count[i]    = longint'(entries[i].count);
        ref_m.min_time[i] = longint'(entries[i].min_time);
      end
      #1;
      for (int i = 0; i < N; i++) check("weight", longint'(weights[i]), ref_m.weight(i));
      check("victim", victim, ref_m.victim());
      check("threshold", longint'(threshold), ref_m.threshold());
      check("best valid", best_valid, ref_m.best() >= 0);
      if (ref_m.best() >= 0) begin
        check("best index", best_index, ref_m.best());
        check("best weight", longint'(best_weight), ref_m.weight(ref_m.best()));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
