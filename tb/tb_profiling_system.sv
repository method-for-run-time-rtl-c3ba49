// tb_profiling_system: end-to-end test of the profiled system at its default
// size (10 loop entries, 4096-word program memory).
//
// A behavioural processor model runs a PowerPC program from the program
// memory. The program has twelve counted loops in a row (more loops than
// table entries, so entries are replaced), a loop that calls a function each
// iteration and a nested pair of loops whose inner loop is re-entered (so a
// longer interval is seen and skipped). Every loop is compiled in the form
// the profiler expects: exit test at the top, unconditional "b" back at the
// bottom. The testbench keeps a reference table fed from the instructions the
// processor reports as executed, checks the best-candidate pins every clock,
// reads the whole table over the register port after each run and also
// checks each simple loop's count and minimum time against the numbers that
// follow from the program (trip count; one cycle per instruction).
// Runs: profiling on; profiling off after a clear (table must stay empty);
// profiling on again. It also checks that the processor keeps one
// instruction per clock while being profiled.
module tb_profiling_system;
  import profiler_pkg::*;
  import profiler_ref_pkg::*;
  localparam int N = 10;           // the top's default table size
  localparam int NSIMPLE = 12;

  logic clk = 0, rst_n = 0;
  logic fetch_en;
  logic [31:0] fetch_addr, fetch_instr;
  logic load_we = 0;
  logic [31:0] load_addr = 0, load_data = 0;
  logic bus_sel = 0, bus_we = 0;
  logic [7:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic best_valid;
  logic [7:0] best_index;
  logic start = 0, done, exec_valid;
  logic [31:0] exec_addr, exec_instr;
  longint n_exec;

  int checks = 0, failures = 0;
  int n_alloc = 0, n_update = 0, n_replace = 0, n_newmin = 0, n_skip = 0, n_ignored = 0, n_clear = 0;
  int n_best = 0;
  bit track = 0;
  longint cyc = 0;
  loop_ref ref_m;
  logic p_valid; logic [31:0] p_addr, p_instr;

  logic [31:0] prog [$];
  int unsigned top_addr [NSIMPLE];
  int trips [NSIMPLE];
  int pad   [NSIMPLE];

  profiling_system dut (.*);

  ppc_fetch_model cpu (
    .clk, .rst_n, .start, .entry(32'h0), .fetch_en, .fetch_addr, .fetch_instr,
    .exec_valid, .exec_addr, .exec_instr, .done, .n_exec);

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("cyc %0d %s: got %0d expected %0d", cyc, what, got, exp);
    end
  endtask

  // ---- a few PowerPC encodings ----
  function automatic logic [31:0] ADDI(int rd, int ra, int simm);
    return {6'd14, 5'(rd), 5'(ra), 16'(simm)};
  endfunction
  function automatic logic [31:0] CMPWI(int ra, int simm);
    return {6'd11, 5'd0, 5'(ra), 16'(simm)};
  endfunction
  function automatic logic [31:0] BC(int bo, int bi, int unsigned from, int unsigned to);
    logic [31:0] d;
    d = to - from;
    return {6'd16, 5'(bo), 5'(bi), d[15:2], 2'b00};
  endfunction
  function automatic logic [31:0] B(int unsigned from, int unsigned to, bit lk);
    logic [31:0] d;
    d = to - from;
    return {6'd18, d[25:2], 1'b0, lk};
  endfunction
  localparam logic [31:0] NOP = 32'h6000_0000;   // ori 0,0,0
  localparam logic [31:0] BLR = 32'h4E80_0020;

  function automatic int unsigned here();
    return 4 * prog.size();
  endfunction

  // for (r = n; r != 0; r--) { pad no-ops; [bl func] }
  // returns the address of the loop's first instruction
  function automatic int unsigned emit_loop(int r, int n, int npad, int unsigned func);
    int unsigned top, fix;
    prog.push_back(ADDI(r, 0, n));
    top = here();
    prog.push_back(CMPWI(r, 0));
    fix = here();
    prog.push_back(0);
    for (int i = 0; i < npad; i++) prog.push_back(NOP);
    if (func != 0) prog.push_back(B(here(), func, 1));
    prog.push_back(ADDI(r, r, -1));
    prog.push_back(B(here(), top, 0));
    prog[fix / 4] = BC(12, 2, fix, here());    // beq cr0 -> exit
    return top;
  endfunction

  task automatic build_program();
    int unsigned func, jmp, outer, ofix, inner;
    // function body placed first, jumped over
    jmp = here();
    prog.push_back(0);
    func = here();
    prog.push_back(NOP);
    prog.push_back(NOP);
    prog.push_back(BLR);
    prog[jmp / 4] = B(jmp, here(), 0);
    for (int k = 0; k < NSIMPLE; k++) begin
      trips[k] = 3 + (k * 7) % 11;
      pad[k]   = (k * 5) % 9;
      top_addr[k] = emit_loop(3, trips[k], pad[k], 0);
    end
    void'(emit_loop(6, 9, 2, func));
    // nested: outer 5 passes, inner 8 iterations each
    prog.push_back(ADDI(4, 0, 5));
    outer = here();
    prog.push_back(CMPWI(4, 0));
    ofix = here();
    prog.push_back(0);
    inner = emit_loop(5, 8, 3, 0);
    prog.push_back(NOP);
    prog.push_back(ADDI(4, 4, -1));
    prog.push_back(B(here(), outer, 0));
    prog[ofix / 4] = BC(12, 2, ofix, here());
    prog.push_back(32'h0);   // halt
  endtask

  // reference: an instruction executed at edge e reaches the table at e+1
  always @(posedge clk) begin
    cyc++;
    if (track && p_valid) begin
      logic [31:0] tgt;
      tgt = p_addr + {{6{p_instr[25]}}, p_instr[25:2], 2'b00};
      if (p_instr[31:26] == 18 && p_instr[1:0] == 2'b00 && tgt <= p_addr) begin
        ref_m.hit(tgt, p_addr - tgt, cyc);
        n_alloc += ref_m.did_alloc; n_update += ref_m.did_update; n_replace += ref_m.did_replace;
        n_newmin += ref_m.did_newmin; n_skip += ref_m.did_update && !ref_m.did_newmin;
      end
    end
    p_valid = exec_valid && fetch_instr != 0; p_addr = exec_addr; p_instr = exec_instr;
    #1;
    if (track) begin
      check("best_valid", best_valid, ref_m.best() >= 0);
      if (ref_m.best() >= 0) begin
        check("best_index", best_index, ref_m.best());
        n_best++;
      end
    end
  end

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    bus_sel = 1; bus_we = 0; bus_addr = a;
    @(negedge clk);
    bus_sel = 0;
    d = bus_rdata;
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    bus_sel = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk);
    bus_sel = 0; bus_we = 0;
  endtask

  task automatic run_program();
    longint c0, c1, e0;
    e0 = n_exec;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    c0 = cyc;
    wait (done);
    c1 = cyc;
    // one instruction per clock: cycles from start to halt = instructions executed
    check("instructions per clock", c1 - c0, n_exec - e0);
    repeat (4) @(negedge clk);
  endtask

  task automatic dump_compare();
    logic [31:0] s, sz, cnt, mn;
    int n_simple_seen;
    n_simple_seen = 0;
    for (int i = 0; i < N; i++) begin
      rd(8'(REG_ENTRY0 + 4 * i), s);
      rd(8'(REG_ENTRY0 + 4 * i + 1), sz);
      rd(8'(REG_ENTRY0 + 4 * i + 2), cnt);
      rd(8'(REG_ENTRY0 + 4 * i + 3), mn);
      check("valid", sz[16], ref_m.valid[i]);
      if (ref_m.valid[i]) begin
        check("start", s, ref_m.start[i]);
        check("size", sz[15:0], ref_m.size[i]);
        check("measured", sz[17], ref_m.measured[i]);
        check("count", cnt, ref_m.count[i]);
        if (ref_m.measured[i]) check("min", mn, ref_m.min_time[i]);
        // numbers that follow from the program text
        for (int k = 0; k < NSIMPLE; k++)
          if (s == top_addr[k]) begin
            n_simple_seen++;
            check("loop trips", cnt, trips[k]);
            check("loop cycles", mn, 4 + pad[k]);
            check("loop body bytes", sz[15:0], 4 * (3 + pad[k]));
          end
      end
    end
    checks++;
    if (n_simple_seen == 0) begin failures++; $display("no simple loop left in the table"); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    ref_m = new(N);
    build_program();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk);
      load_we = 1; load_addr = 32'(4 * i); load_data = prog[i];
    end
    @(negedge clk) load_we = 0;
    rd(REG_NLOOPS, d); check("NUM_LOOPS", d, N);

    // run 1: profiling on from reset
    track = 1;
    run_program();
    dump_compare();
    rd(REG_STATUS, d); check("status count", d[7:0], N);
    check("status best", d[16], ref_m.best() >= 0);
    if (ref_m.best() >= 0) check("status best index", d[15:8], ref_m.best());
    rd(REG_THRESH_LO, d); check("threshold", d, ref_m.threshold() & 64'hFFFF_FFFF);
    rd(REG_BEST_LO, d);
    if (ref_m.best() >= 0) check("best weight", d, ref_m.weight(ref_m.best()) & 64'hFFFF_FFFF);

    // run 2: clear and stop; the table must stay empty
    track = 0;
    wr(REG_CTRL, 32'h2);
    n_clear++;
    ref_m.clear();
    run_program();
    n_ignored++;
    rd(REG_STATUS, d); check("stopped: no entries", d[7:0], 0);
    rd(REG_TIMER, d);  check("stopped: timer held", d, 0);

    // run 3: profiling on again, same program, same result
    wr(REG_CTRL, 32'h1);
    track = 1;
    run_program();
    dump_compare();
    track = 0;

    $display("alloc=%0d update=%0d replace=%0d newmin=%0d skip=%0d clear=%0d stopped_runs=%0d best_cycles=%0d",
             n_alloc, n_update, n_replace, n_newmin, n_skip, n_clear, n_ignored, n_best);
    checks++;
    if (n_alloc == 0 || n_update == 0 || n_replace == 0 || n_newmin == 0 || n_skip == 0 ||
        n_clear == 0 || n_ignored == 0 || n_best == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
