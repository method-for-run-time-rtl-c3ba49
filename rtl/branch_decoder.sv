// branch_decoder: recognises the monitored branch instruction and extracts
// the loop it closes.
//
// A compiled "for" loop ends in an unconditional, PC-relative branch back to
// its first instruction. The decoder compares the instruction word with a
// mask/value pair (by default the PowerPC "b" encoding: opcode 18, AA=0,
// LK=0), sign-extends the 24-bit word displacement LI and computes the branch
// target. With BACKWARD_ONLY set only non-positive displacements count; the
// target is then the loop start and (branch address - target) the body size
// in bytes. The monitored instruction being a parameter follows the original method,
// which lets the same block trace function calls instead of loops (for
// example MATCH_MASK=B_MASK, MATCH_VALUE=BL_VALUE, BACKWARD_ONLY=0); the
// encodings are those of the PowerPC instruction set. For forward targets the
// body size is reported as 0.
//
// Purely combinational: hit, target and body_size follow the inputs in the
// same cycle.
module branch_decoder
  import profiler_pkg::*;
#(
  parameter instr_t MATCH_MASK    = B_MASK,
  parameter instr_t MATCH_VALUE   = B_VALUE,
  parameter bit     BACKWARD_ONLY = 1'b1
) (
  input  logic   valid,
  input  addr_t  addr,
  input  instr_t instr,
  output logic   hit,
  output addr_t  target,
  output size_t  body_size
);

  addr_t disp;      // sign-extended byte displacement
  logic  backward;
  addr_t back_dist;

  always_comb begin
    disp     = {{(ADDR_W-26){instr[25]}}, instr[25:2], 2'b00};
    target   = instr[1] ? disp : addr + disp;  // AA selects absolute
    backward = (target <= addr) && (instr[1] || instr[25] || disp == '0);
    back_dist     = addr - target;
    hit      = valid && ((instr & MATCH_MASK) == MATCH_VALUE)
                     && (backward || !BACKWARD_ONLY);
    if (!backward)
      body_size = '0;
    else if (back_dist > addr_t'({SIZE_W{1'b1}}))
      body_size = '1;
    else
      body_size = back_dist[SIZE_W-1:0];
  end

endmodule
