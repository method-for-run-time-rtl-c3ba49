// tb_loop_mix: the profiled system at its default size running a generated
// program with 114 loops, far more loops than the 10 table entries, as in a
// media decoder. The loops come in 38 groups: an outer loop around two inner
// loops, with trip counts and body lengths drawn from a fixed pseudo-random
// sequence. A reference table fed from the processor's executed
// instructions is compared with the best-candidate pins every clock and with
// the full register read-out at the end. The test also checks that all 114
// loops were seen and that the table ends full, and it prints the coverage.
module tb_loop_mix;
  import profiler_pkg::*;
  import profiler_ref_pkg::*;
  localparam int N = 10;
  localparam int GROUPS = 38;

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
  int n_replace = 0, n_skip = 0;
  bit track = 0;
  longint cyc = 0;
  loop_ref ref_m;
  logic p_valid; logic [31:0] p_addr, p_instr;
  logic [31:0] prog [$];
  int seen [int unsigned];
  int unsigned lcg = 32'd12345;

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

  function automatic int rnd(int lo, int hi);
    lcg = lcg * 32'd1103515245 + 32'd12345;
    return lo + int'((lcg >> 16) % (hi - lo + 1));
  endfunction

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
  function automatic logic [31:0] B(int unsigned from, int unsigned to);
    logic [31:0] d;
    d = to - from;
    return {6'd18, d[25:2], 2'b00};
  endfunction
  localparam logic [31:0] NOP = 32'h6000_0000;

  function automatic int unsigned here();
    return 4 * prog.size();
  endfunction

  // loop head; returns the address of the placeholder exit branch
  function automatic int unsigned open_loop(int r, int n, output int unsigned top);
    int unsigned fix;
    prog.push_back(ADDI(r, 0, n));
    top = here();
    prog.push_back(CMPWI(r, 0));
    fix = here();
    prog.push_back(0);
    return fix;
  endfunction

  function automatic void close_loop(int r, int unsigned top, int unsigned fix);
    prog.push_back(ADDI(r, r, -1));
    prog.push_back(B(here(), top));
    prog[fix / 4] = BC(12, 2, fix, here());
  endfunction

  function automatic void pads(int n);
    for (int i = 0; i < n; i++) prog.push_back(NOP);
  endfunction

  task automatic build_program();
    int unsigned t0, f0, t1, f1, t2, f2;
    for (int g = 0; g < GROUPS; g++) begin
      f0 = open_loop(4, rnd(1, 3), t0);
      pads(rnd(0, 3));
      f1 = open_loop(5, rnd(2, 24), t1);
      pads(rnd(0, 10));
      close_loop(5, t1, f1);
      f2 = open_loop(6, rnd(2, 12), t2);
      pads(rnd(0, 6));
      close_loop(6, t2, f2);
      close_loop(4, t0, f0);
    end
    prog.push_back(32'h0);
  endtask

  always @(posedge clk) begin
    cyc++;
    if (track && p_valid) begin
      logic [31:0] tgt;
      tgt = p_addr + {{6{p_instr[25]}}, p_instr[25:2], 2'b00};
      if (p_instr[31:26] == 18 && p_instr[1:0] == 2'b00 && tgt <= p_addr) begin
        ref_m.hit(tgt, p_addr - tgt, cyc);
        seen[tgt] = 1;
        n_replace += ref_m.did_replace;
        n_skip += ref_m.did_update && !ref_m.did_newmin;
      end
    end
    p_valid = exec_valid && fetch_instr != 0; p_addr = exec_addr; p_instr = exec_instr;
    #1;
    if (track) begin
      check("best_valid", best_valid, ref_m.best() >= 0);
      if (ref_m.best() >= 0) check("best_index", best_index, ref_m.best());
    end
  end

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    bus_sel = 1; bus_we = 0; bus_addr = a;
    @(negedge clk);
    bus_sel = 0;
    d = bus_rdata;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, s, sz, cnt, mn;
    ref_m = new(N);
    build_program();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk);
      load_we = 1; load_addr = 32'(4 * i); load_data = prog[i];
    end
    @(negedge clk) load_we = 0;
    track = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    repeat (4) @(negedge clk);
    track = 0;
    for (int i = 0; i < N; i++) begin
      rd(8'(REG_ENTRY0 + 4 * i), s);
      rd(8'(REG_ENTRY0 + 4 * i + 1), sz);
      rd(8'(REG_ENTRY0 + 4 * i + 2), cnt);
      rd(8'(REG_ENTRY0 + 4 * i + 3), mn);
      check("valid", sz[16], ref_m.valid[i]);
      check("start", s, ref_m.start[i]);
      check("size", sz[15:0], ref_m.size[i]);
      check("count", cnt, ref_m.count[i]);
      if (ref_m.measured[i]) check("min", mn, ref_m.min_time[i]);
    end
    rd(REG_STATUS, d);
    check("table full", d[7:0], N);
    check("loops in program", seen.num(), 3 * GROUPS);
    $display("program: %0d words, %0d instructions executed; loops seen %0d, tracked %0d (%0.1f%%); replacements %0d, skipped intervals %0d",
             prog.size(), n_exec, seen.num(), N, 100.0 * N / seen.num(), n_replace, n_skip);
    checks++;
    if (n_replace == 0 || n_skip == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
