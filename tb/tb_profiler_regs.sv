// tb_profiler_regs: presents random table contents to the register port and
// reads every register back over the bus, checking each field, the one-cycle
// read latency, the enable bit (on after reset) and the one-cycle clear pulse.
module tb_profiler_regs;
  import profiler_pkg::*;
  localparam int N = 10;
  logic clk = 0, rst_n = 0;
  logic bus_sel = 0, bus_we = 0;
  logic [7:0]  bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic enable, clear;
  loop_entry_t entries [N];
  logic best_valid;
  logic [7:0] best_index;
  weight_t best_weight, threshold;
  ts_t now;
  int checks = 0, failures = 0;

  profiler_regs #(.NUM_LOOPS(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

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

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int nv;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 50; k++) begin
      nv = 0;
      for (int i = 0; i < N; i++) begin
        entries[i] = {$urandom, $urandom, $urandom, $urandom, $urandom};
        nv += entries[i].valid;
      end
      best_valid  = 1'($urandom);
      best_index  = 8'($urandom % N);
      best_weight = {$urandom, $urandom};
      threshold   = {$urandom, $urandom};
      now         = $urandom;
      rd(REG_STATUS, d);    check("status", d, {15'b0, best_valid, best_index, 8'(nv)});
      rd(REG_BEST_LO, d);   check("best lo", d, best_weight[31:0]);
      rd(REG_BEST_HI, d);   check("best hi", d, 32'(best_weight[47:32]));
      rd(REG_THRESH_LO, d); check("thr lo", d, threshold[31:0]);
      rd(REG_THRESH_HI, d); check("thr hi", d, 32'(threshold[47:32]));
      rd(REG_TIMER, d);     check("timer", d, now);
      rd(REG_NLOOPS, d);    check("nloops", d, N);
      rd(8'h20, d);         check("unmapped", d, 0);
      rd(8'(REG_ENTRY0 + 4 * N), d); check("past last entry", d, 0);
      for (int i = 0; i < N; i++) begin
        rd(8'(REG_ENTRY0 + 4 * i), d);     check("start", d, entries[i].start_addr);
        rd(8'(REG_ENTRY0 + 4 * i + 1), d); check("size", d, {14'b0, entries[i].measured, entries[i].valid, entries[i].size});
        rd(8'(REG_ENTRY0 + 4 * i + 2), d); check("count", d, entries[i].count);
        rd(8'(REG_ENTRY0 + 4 * i + 3), d); check("min", d, 32'(entries[i].min_time));
      end
    end
    // control: enable after reset, stop, clear pulse, restart
    rd(REG_CTRL, d); check("enable after reset", d, 1);
    check("enable pin", enable, 1);
    wr(REG_CTRL, 0); check("enable off", enable, 0);
    rd(REG_CTRL, d); check("ctrl read", d, 0);
    check("no clear", clear, 0);
    @(negedge clk);
    bus_sel = 1; bus_we = 1; bus_addr = REG_CTRL; bus_wdata = 32'h3;
    @(posedge clk); #1;
    check("clear pulse", clear, 1);
    check("enable on", enable, 1);
    bus_sel = 0; bus_we = 0;
    @(posedge clk); #1;
    check("clear one cycle", clear, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
