// program_bram: block RAM that holds the program under profile.
//
// The profiler cannot see inside the processor's caches, so the application
// runs from a block RAM whose fetch port the profiler observes; that
// arrangement is the original method's. This is a simple dual-port memory of
// MEM_WORDS 32-bit words (size chosen here): port A is the processor's
// instruction fetch, port B loads the program. Addresses are byte addresses;
// bits [1:0] are ignored and the word index wraps modulo MEM_WORDS.
// Timing: a read registers mem[rd_addr] at the clock edge where rd_en is
// high, like a block RAM with registered output; a write updates the word at
// its edge (read-before-write when both ports hit one word). MEM_WORDS must
// be a power of two. The contents
// are not reset.
module program_bram #(
  parameter int unsigned MEM_WORDS = 4096
) (
  input  logic        clk,
  input  logic        rd_en,
  input  logic [31:0] rd_addr,
  output logic [31:0] rd_data,
  input  logic        we,
  input  logic [31:0] wr_addr,
  input  logic [31:0] wr_data
);

  localparam int unsigned AW = $clog2(MEM_WORDS);

  logic [31:0] mem [MEM_WORDS];

  always_ff @(posedge clk) begin
    if (rd_en)
      rd_data <= mem[rd_addr[AW+1:2]];
  end

  always_ff @(posedge clk) begin
    if (we)
      mem[wr_addr[AW+1:2]] <= wr_data;
  end

endmodule
