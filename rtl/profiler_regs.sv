// profiler_regs: the processor's window onto the profiler.
//
// After (or during) a run the processor reads the collected loop data and the
// best candidate through this port and passes it on (to a host over the UART,
// or to its own choice of accelerator). The bus is a plain single-master
// register port: bus_sel with bus_we writes bus_wdata at bus_addr in that
// cycle; bus_sel without bus_we reads, and bus_rdata holds the word from the
// next cycle on. The original method does not define the port; the bus and the map
// below are this design's.
//   0x00 CTRL     bit0 enable (1 after reset); writing bit1=1 clears the
//                 table and timer for one cycle (reads as 0)
//   0x01 STATUS   [7:0] valid entries, [15:8] best index, [16] best valid
//   0x02/0x03     best weight, low / high word
//   0x04/0x05     threshold weight, low / high word
//   0x06 TIMER    current cycle count
//   0x07 NLOOPS   number of table entries
//   0x40+4i+f     entry i: f=0 start address, f=1 {14'b0, measured, valid,
//                 body size}, f=2 iteration count, f=3 minimum cycles
// Unmapped addresses read 0. Reset is active-low and synchronous.
module profiler_regs
  import profiler_pkg::*;
#(
  parameter int unsigned NUM_LOOPS = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_sel,
  input  logic        bus_we,
  input  logic [7:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        enable,
  output logic        clear,
  input  loop_entry_t entries [NUM_LOOPS],
  input  logic        best_valid,
  input  logic [7:0]  best_index,
  input  weight_t     best_weight,
  input  weight_t     threshold,
  input  ts_t         now
);

  logic [31:0] rd_word;
  logic [7:0]  n_valid;
  localparam int unsigned IW = (NUM_LOOPS > 1) ? $clog2(NUM_LOOPS) : 1;

  logic [7:0]    eoff;
  logic [IW-1:0] eidx;

  always_comb begin
    n_valid = '0;
    for (int i = 0; i < NUM_LOOPS; i++)
      n_valid = n_valid + 8'(entries[i].valid);

    eoff    = (bus_addr - REG_ENTRY0) >> 2;
    eidx    = eoff[IW-1:0];
    rd_word = '0;
    case (bus_addr)
      REG_CTRL:      rd_word = {31'b0, enable};
      REG_STATUS:    rd_word = {15'b0, best_valid, best_index, n_valid};
      REG_BEST_LO:   rd_word = best_weight[31:0];
      REG_BEST_HI:   rd_word = 32'(best_weight[WEIGHT_W-1:32]);
      REG_THRESH_LO: rd_word = threshold[31:0];
      REG_THRESH_HI: rd_word = 32'(threshold[WEIGHT_W-1:32]);
      REG_TIMER:     rd_word = 32'(now);
      REG_NLOOPS:    rd_word = 32'(NUM_LOOPS);
      default:
        if (bus_addr >= REG_ENTRY0 && eoff < 8'(NUM_LOOPS)) begin
          unique case (bus_addr[1:0])
            2'd0: rd_word = 32'(entries[eidx].start_addr);
            2'd1: rd_word = {14'b0, entries[eidx].measured, entries[eidx].valid,
                             16'(entries[eidx].size)};
            2'd2: rd_word = 32'(entries[eidx].count);
            2'd3: rd_word = 32'(entries[eidx].min_time);
          endcase
        end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      enable    <= 1'b1;
      clear     <= 1'b0;
      bus_rdata <= '0;
    end else begin
      clear <= 1'b0;
      if (bus_sel && bus_we && bus_addr == REG_CTRL) begin
        enable <= bus_wdata[0];
        clear  <= bus_wdata[1];
      end
      if (bus_sel && !bus_we)
        bus_rdata <= rd_word;
    end
  end

endmodule
