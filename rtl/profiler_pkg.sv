// profiler_pkg: types and constants shared by the loop profiler.
//
// The profiler watches the instruction words a PowerPC 405 fetches from the
// block RAM that holds the program under profile. Every taken, unconditional,
// PC-relative backward branch ("b" with a negative displacement) closes one
// iteration of a loop; the branch target is the loop start and the distance
// back to it is the loop body size. For each tracked loop the table keeps the
// start address, body size, iteration count and the shortest number of clock
// cycles seen between two consecutive iterations.
//
// The branch encoding follows the PowerPC instruction set: primary opcode 18
// in the top six bits, a 24-bit word displacement LI in bits 25:2, AA in bit 1
// and LK in bit 0. Field widths of the table (16-bit body size, 32-bit count,
// 16-bit minimum time, 32-bit timestamps) are this design's own choice.
package profiler_pkg;

  localparam int unsigned ADDR_W  = 32;  // PowerPC effective address
  localparam int unsigned INSTR_W = 32;  // PowerPC instruction word
  localparam int unsigned SIZE_W  = 16;  // loop body size in bytes, saturating
  localparam int unsigned COUNT_W = 32;  // iterations, saturating
  localparam int unsigned TIME_W  = 16;  // cycles per iteration, saturating
  localparam int unsigned TS_W    = 32;  // free-running cycle timer
  localparam int unsigned WEIGHT_W = COUNT_W + TIME_W;

  // Unconditional relative branch without link: b target
  localparam logic [INSTR_W-1:0] B_MASK  = 32'hFC00_0003;
  localparam logic [INSTR_W-1:0] B_VALUE = 32'h4800_0000;
  // Relative branch with link (a function call): bl target
  localparam logic [INSTR_W-1:0] BL_VALUE = 32'h4800_0001;

  typedef logic [ADDR_W-1:0]   addr_t;
  typedef logic [INSTR_W-1:0]  instr_t;
  typedef logic [SIZE_W-1:0]   size_t;
  typedef logic [COUNT_W-1:0]  count_t;
  typedef logic [TIME_W-1:0]   time_t;
  typedef logic [TS_W-1:0]     ts_t;
  typedef logic [WEIGHT_W-1:0] weight_t;

  // One tracked loop (or call target).
  typedef struct packed {
    logic    valid;      // entry holds a loop
    logic    measured;   // min_time holds at least one interval
    addr_t   start_addr; // branch target = first instruction of the loop
    size_t   size;       // bytes from loop start to the closing branch
    count_t  count;      // times the closing branch was taken
    time_t   min_time;   // shortest interval between two iterations
    ts_t     last_ts;    // timer value at the latest iteration
  } loop_entry_t;

  // Register map of the processor read-out port (word addresses).
  localparam logic [7:0] REG_CTRL      = 8'h00;
  localparam logic [7:0] REG_STATUS    = 8'h01;
  localparam logic [7:0] REG_BEST_LO   = 8'h02;
  localparam logic [7:0] REG_BEST_HI   = 8'h03;
  localparam logic [7:0] REG_THRESH_LO = 8'h04;
  localparam logic [7:0] REG_THRESH_HI = 8'h05;
  localparam logic [7:0] REG_TIMER     = 8'h06;
  localparam logic [7:0] REG_NLOOPS    = 8'h07;
  localparam logic [7:0] REG_ENTRY0    = 8'h40;  // + 4*i + field

endpackage
