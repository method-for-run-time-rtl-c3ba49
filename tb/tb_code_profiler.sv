// tb_code_profiler: feeds a synthetic fetch stream to two profilers - the
// default loop profiler and one whose monitored instruction is "bl" (call
// tracing) - and checks them against reference models.
//
// The stream mixes ordinary instructions, loop-closing backward "b"s of 14
// loops (more than the 10 entries, so entries get replaced), forward "b"s,
// conditional branches and "bl" calls. Every clock the best-candidate pins are
// compared with the model, which receives each fetch two clock edges after it
// was presented (the profiler's latency). At the end of each phase profiling
// is stopped through the control register and every register is read back
// over the bus and compared. Phases: run, stop (fetches must be ignored),
// clear, run again.
module tb_code_profiler;
  import profiler_pkg::*;
  import profiler_ref_pkg::*;
  localparam int N = 10;
  logic clk = 0, rst_n = 0;
  logic snoop_valid = 0;
  addr_t snoop_addr = 0;
  instr_t snoop_instr = 0;
  logic bus_sel = 0, bus_we = 0;
  logic [7:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, rdata_l, rdata_c;
  logic bv_l, bv_c;
  logic [7:0] bi_l, bi_c;
  int checks = 0, failures = 0;
  int n_alloc = 0, n_update = 0, n_replace = 0, n_newmin = 0, n_skip = 0, n_calls = 0, n_ignored = 0;
  bit track = 0;       // model follows the stream
  loop_ref ref_l, ref_c;
  // fetch sampled at the previous edge
  logic p_valid; addr_t p_addr; instr_t p_instr;
  longint cyc = 0;
  int unsigned lstart [14];
  int unsigned lsize  [14];

  code_profiler #(.NUM_LOOPS(N)) dut_loop (
    .clk, .rst_n, .snoop_valid, .snoop_addr, .snoop_instr,
    .bus_sel, .bus_we, .bus_addr, .bus_wdata, .bus_rdata(rdata_l),
    .best_valid(bv_l), .best_index(bi_l));
  code_profiler #(.NUM_LOOPS(N), .MATCH_MASK(B_MASK), .MATCH_VALUE(BL_VALUE), .BACKWARD_ONLY(1'b0)) dut_call (
    .clk, .rst_n, .snoop_valid, .snoop_addr, .snoop_instr,
    .bus_sel, .bus_we, .bus_addr, .bus_wdata, .bus_rdata(rdata_c),
    .best_valid(bv_c), .best_index(bi_c));

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("cyc %0d %s: got %0d expected %0d", cyc, what, got, exp);
    end
  endtask

  function automatic instr_t enc_b(addr_t from, addr_t to, bit lk);
    addr_t d;
    d = to - from;
    return {6'd18, d[25:2], 1'b0, lk};
  endfunction

  // model update: a fetch sampled at edge e reaches the table at edge e+1
  always @(posedge clk) begin
    cyc++;
    if (track && p_valid) begin
      logic [31:0] tgt;
      tgt = p_addr + 32'($signed({p_instr[25:2], 2'b00}));
      if (p_instr[31:26] == 18 && p_instr[1:0] == 2'b00 && tgt <= p_addr) begin
        ref_l.hit(tgt, p_addr - tgt, cyc);
        n_alloc += ref_l.did_alloc; n_update += ref_l.did_update; n_replace += ref_l.did_replace;
        n_newmin += ref_l.did_newmin; n_skip += ref_l.did_update && !ref_l.did_newmin;
      end
      if (p_instr[31:26] == 18 && p_instr[1:0] == 2'b01) begin
        ref_c.hit(tgt, (tgt <= p_addr) ? (p_addr - tgt) : 0, cyc);
        n_calls++;
      end
    end
    p_valid = snoop_valid; p_addr = snoop_addr; p_instr = snoop_instr;
    #1;
    if (track) begin
      check("loop best_valid", bv_l, ref_l.best() >= 0);
      if (ref_l.best() >= 0) check("loop best_index", bi_l, ref_l.best());
      check("call best_valid", bv_c, ref_c.best() >= 0);
      if (ref_c.best() >= 0) check("call best_index", bi_c, ref_c.best());
    end
  end

  task automatic rd(input logic [7:0] a, output logic [31:0] dl, output logic [31:0] dc);
    @(negedge clk);
    bus_sel = 1; bus_we = 0; bus_addr = a;
    @(negedge clk);
    bus_sel = 0;
    dl = rdata_l; dc = rdata_c;
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    bus_sel = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk);
    bus_sel = 0; bus_we = 0;
  endtask

  task automatic compare_one(string who, loop_ref r, logic [7:0] a, int i, int f, logic [31:0] d);
    case (f)
      0: if (r.valid[i]) check({who, " start"}, d, r.start[i]);
      1: check({who, " flags/size"}, r.valid[i] ? d : 32'(d[16]), r.valid[i] ? {14'b0, r.measured[i], 1'b1, 16'(r.size[i])} : 0);
      2: if (r.valid[i]) check({who, " count"}, d, r.count[i]);
      3: if (r.valid[i] && r.measured[i]) check({who, " min"}, d, r.min_time[i]);
    endcase
  endtask

  task automatic dump_compare();
    logic [31:0] dl, dc;
    longint thr;
    for (int i = 0; i < N; i++)
      for (int f = 0; f < 4; f++) begin
        rd(8'(REG_ENTRY0 + 4 * i + f), dl, dc);
        compare_one("loop", ref_l, 8'(REG_ENTRY0 + 4 * i + f), i, f, dl);
        compare_one("call", ref_c, 8'(REG_ENTRY0 + 4 * i + f), i, f, dc);
      end
    rd(REG_THRESH_LO, dl, dc);
    thr = ref_l.threshold(); check("loop thr", dl, thr & 64'hFFFF_FFFF);
    thr = ref_c.threshold(); check("call thr", dc, thr & 64'hFFFF_FFFF);
    rd(REG_BEST_LO, dl, dc);
    if (ref_l.best() >= 0) check("loop best weight", dl, ref_l.weight(ref_l.best()) & 64'hFFFF_FFFF);
  endtask

  task automatic run_stream(int cycles);
    for (int k = 0; k < cycles; k++) begin
      int sel, l;
      @(negedge clk);
      sel = $urandom % 16;
      l   = ($urandom >> 3) % 14;
      // loops 0..4 hot
      if (($urandom >> 5) % 2 == 0) l = l % 5;
      snoop_valid = (($urandom >> 7) % 8) != 0;
      snoop_addr  = lstart[l] + 32'(4 * (($urandom >> 9) % (lsize[l] / 4)));
      if (sel < 6) begin               // closing branch of loop l
        snoop_addr  = lstart[l] + lsize[l];
        snoop_instr = enc_b(snoop_addr, lstart[l], 0);
      end else if (sel < 8)            // forward jump, ignored
        snoop_instr = enc_b(snoop_addr, snoop_addr + 32'h40, 0);
      else if (sel < 9)                // conditional branch back, ignored
        snoop_instr = {6'd16, 5'd16, 5'd0, 14'h3FF0, 2'b00};
      else if (sel < 11)               // call to one of three functions
        snoop_instr = enc_b(snoop_addr, 32'h8000 + 32'((($urandom >> 11) % 3) * 32'h100), 1);
      else                             // addi
        snoop_instr = {6'd14, 26'($urandom)};
    end
    @(negedge clk) snoop_valid = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] dl, dc;
    ref_l = new(N);
    ref_c = new(N);
    for (int i = 0; i < 14; i++) begin
      lstart[i] = 32'h1000 + 32'(i * 32'h200);
      lsize[i]  = 32'(8 + 4 * (i % 7));
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    rd(REG_CTRL, dl, dc); check("enabled after reset", dl, 1);
    rd(REG_NLOOPS, dl, dc); check("nloops", dl, N);
    // phase 1
    track = 1;
    run_stream(4000);
    repeat (3) @(negedge clk);
    wr(REG_CTRL, 0);
    // phase 2: stopped, fetches must leave the table unchanged
    track = 0;
    run_stream(300);
    n_ignored = 300;
    repeat (3) @(negedge clk);
    dump_compare();
    rd(REG_STATUS, dl, dc); check("status valid count", dl[7:0], N);
    // phase 3: clear and restart
    wr(REG_CTRL, 3);
    ref_l.clear(); ref_c.clear();
    rd(REG_STATUS, dl, dc); check("cleared", dl[7:0], 0);
    track = 1;
    run_stream(3000);
    repeat (3) @(negedge clk);
    track = 0;
    wr(REG_CTRL, 0);
    dump_compare();
    $display("alloc=%0d update=%0d replace=%0d newmin=%0d skip=%0d calls=%0d ignored=%0d",
             n_alloc, n_update, n_replace, n_newmin, n_skip, n_calls, n_ignored);
    checks++;
    if (n_alloc == 0 || n_update == 0 || n_replace == 0 || n_newmin == 0 || n_skip == 0 || n_calls == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
