// profiling_system: the profiled processor's program memory with the loop
// profiler attached.
//
// The processor (an embedded PowerPC 405 on the target platform) fetches its
// program from program_bram through the fetch_* ports; the word appears on
// fetch_instr one cycle after the request. The top delays the request's
// address by that same cycle and hands address and instruction to the
// code_profiler, which therefore sees exactly the instruction stream the
// processor executes, without adding a cycle to it. The program is written
// through the load_* ports; the processor reads the profiling results and
// starts, stops or clears profiling through the bus_* register port (map in
// profiler_regs). best_valid/best_index flag the current best candidate.
// The processor, the reconfigurable accelerator region, its reconfiguration
// controller, the UART and the external memory are outside this top; the
// processor drives and reads all of its ports.
module profiling_system
  import profiler_pkg::*;
#(
  parameter int unsigned NUM_LOOPS = 10,
  parameter int unsigned MEM_WORDS = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fetch_en,
  input  logic [31:0] fetch_addr,
  output logic [31:0] fetch_instr,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  input  logic        bus_sel,
  input  logic        bus_we,
  input  logic [7:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        best_valid,
  output logic [7:0]  best_index
);

  logic        fetch_valid_q;
  logic [31:0] fetch_addr_q;

  program_bram #(.MEM_WORDS(MEM_WORDS)) u_mem (
    .clk    (clk),
    .rd_en  (fetch_en),
    .rd_addr(fetch_addr),
    .rd_data(fetch_instr),
    .we     (load_we),
    .wr_addr(load_addr),
    .wr_data(load_data)
  );

  // Address and valid of the word now on fetch_instr.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fetch_valid_q <= 1'b0;
      fetch_addr_q  <= '0;
    end else begin
      fetch_valid_q <= fetch_en;
      if (fetch_en)
        fetch_addr_q <= fetch_addr;
    end
  end

  code_profiler #(.NUM_LOOPS(NUM_LOOPS)) u_prof (
    .clk        (clk),
    .rst_n      (rst_n),
    .snoop_valid(fetch_valid_q),
    .snoop_addr (fetch_addr_q),
    .snoop_instr(fetch_instr),
    .bus_sel    (bus_sel),
    .bus_we     (bus_we),
    .bus_addr   (bus_addr),
    .bus_wdata  (bus_wdata),
    .bus_rdata  (bus_rdata),
    .best_valid (best_valid),
    .best_index (best_index)
  );

endmodule
