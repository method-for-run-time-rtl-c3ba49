// tb_loop_table: streams random monitored-branch events (16 loop starts
// competing for the 10 entries, random gaps, occasional long pauses) into the
// loop table and compares every entry, the weights, best candidate,
// threshold and event pulses with the reference model after every clock.
// It counts each mechanism - allocation, update, new minimum, skipped
// (larger) interval, replacement, interval saturation, clear - and fails if
// one never happened.
module tb_loop_table;
  import profiler_pkg::*;
  import profiler_ref_pkg::*;
  localparam int N = 10;
  logic clk = 0, rst_n = 0, clear = 0, hit = 0;
  addr_t target = 0;
  size_t body_size = 0;
  ts_t   now = 0;
  loop_entry_t entries [N];
  weight_t     weights [N];
  logic        best_valid;
  logic [7:0]  best_index;
  weight_t     best_weight, threshold;
  logic        ev_update, ev_alloc, ev_replace, ev_newmin;
  int checks = 0, failures = 0;
  int n_alloc = 0, n_update = 0, n_newmin = 0, n_skip = 0, n_replace = 0, n_sat = 0, n_clear = 0;
  loop_ref ref_m;
  int unsigned pool [16];
  longint t;

  loop_table #(.NUM_LOOPS(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("t=%0d %s: got %0d expected %0d", t, what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_m = new(N);
    for (int i = 0; i < 16; i++) pool[i] = 32'h1000 + 32'(i * 64);
    t = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 20000; k++) begin
      int p;
      // loops 0..5 are hot, the others rare
      p = ($urandom % 3 != 0) ? $urandom % 6 : 6 + $urandom % 10;
      hit       = (($urandom >> 4) % 4) != 0;
      target    = pool[p];
      body_size = size_t'(16 + p * 4);
      clear     = (k % 5000) == 4999;
      t        += 1 + (($urandom % 500 == 0) ? 70000 : 0);
      now       = ts_t'(t);
      @(posedge clk);
      if (clear) begin
        ref_m.clear();
        n_clear++;
      end else if (hit) begin
        ref_m.hit(target, body_size, t);
        if (ref_m.did_update && !ref_m.did_newmin) n_skip++;
      end else begin
        ref_m.did_update = 0; ref_m.did_alloc = 0; ref_m.did_replace = 0; ref_m.did_newmin = 0;
      end
      #1;
      if (clear) begin
        ref_m.did_update = 0; ref_m.did_alloc = 0; ref_m.did_replace = 0; ref_m.did_newmin = 0;
      end
      check("ev_update", ev_update, ref_m.did_update);
      check("ev_alloc", ev_alloc, ref_m.did_alloc);
      check("ev_replace", ev_replace, ref_m.did_replace);
      check("ev_newmin", ev_newmin, ref_m.did_newmin);
      n_alloc += ev_alloc; n_update += ev_update; n_newmin += ev_newmin; n_replace += ev_replace;
      for (int i = 0; i < N; i++) begin
        check("valid", entries[i].valid, ref_m.valid[i]);
        if (ref_m.valid[i]) begin
          check("start", entries[i].start_addr, ref_m.start[i]);
          check("size", entries[i].size, ref_m.size[i]);
          check("count", entries[i].count, ref_m.count[i]);
          check("measured", entries[i].measured, ref_m.measured[i]);
          if (ref_m.measured[i]) check("min_time", entries[i].min_time, ref_m.min_time[i]);
          if (ref_m.min_time[i] == 65535) n_sat++;
        end
        check("weight", longint'(weights[i]), ref_m.weight(i));
      end
      check("best_valid", best_valid, ref_m.best() >= 0);
      if (ref_m.best() >= 0) check("best_index", best_index, ref_m.best());
      check("threshold", longint'(threshold), ref_m.threshold());
      @(negedge clk);
    end
    $display("alloc=%0d update=%0d newmin=%0d skip=%0d replace=%0d sat=%0d clear=%0d",
             n_alloc, n_update, n_newmin, n_skip, n_replace, n_sat, n_clear);
    checks++;
    if (n_alloc == 0 || n_update == 0 || n_newmin == 0 || n_skip == 0 || n_replace == 0 ||
        n_sat == 0 || n_clear == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
