// ppc_fetch_model: behavioural stand-in for the embedded PowerPC processor,
// used only by testbenches. Not synthesizable and not a processor design.
//
// It fetches one instruction per clock from the program memory's fetch port
// (one cycle read latency) and executes the small subset of the PowerPC
// instruction set the test programs use:
//   addi rD,rA,SIMM   cmpwi cr0,rA,SIMM   mtctr rS   mfctr rD
//   b / bl target     bc BO,BI,target (CTR and CR0 conditions)   blr
// Any other word is executed as a no-op, and the word 0x00000000 halts the
// model. The next fetch address is computed in the same cycle from the word
// on fetch_instr, so a program runs at exactly one instruction per clock.
// Each executed instruction is reported on exec_* in the cycle it executes.
// start (one-cycle pulse) begins execution at entry; done rises at halt.
module ppc_fetch_model (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] entry,
  output logic        fetch_en,
  output logic [31:0] fetch_addr,
  input  logic [31:0] fetch_instr,
  output logic        exec_valid,
  output logic [31:0] exec_addr,
  output logic [31:0] exec_instr,
  output logic        done,
  output longint      n_exec
);

  logic        running;
  logic [31:0] pc_q, next_pc;
  logic [31:0] r [32];
  logic [31:0] ctr, lr;
  logic        cr_lt, cr_gt, cr_eq;
  logic [31:0] ctr_next;
  logic        take;

  function automatic logic [31:0] sext16(logic [15:0] v);
    return {{16{v[15]}}, v};
  endfunction

  always_comb begin
    logic [5:0] op;
    logic [4:0] bo, bi;
    logic       cr_bit, ctr_ok, cond_ok;
    op       = fetch_instr[31:26];
    bo       = fetch_instr[25:21];
    bi       = fetch_instr[20:16];
    next_pc  = pc_q + 4;
    ctr_next = ctr;
    take     = 1'b0;
    cr_bit   = (bi == 0) ? cr_lt : (bi == 1) ? cr_gt : cr_eq;
    ctr_ok   = 1'b1;
    if (!bo[2]) begin
      ctr_next = ctr - 1;
      ctr_ok   = (ctr_next != 0) ^ bo[1];
    end
    cond_ok = bo[4] || (cr_bit == bo[3]);
    case (op)
      6'd18: begin
        take    = 1'b1;
        next_pc = (fetch_instr[1] ? 32'h0 : pc_q) + {{6{fetch_instr[25]}}, fetch_instr[25:2], 2'b00};
      end
      6'd16: begin
        take = ctr_ok && cond_ok;
        if (take)
          next_pc = (fetch_instr[1] ? 32'h0 : pc_q) + {{16{fetch_instr[15]}}, fetch_instr[15:2], 2'b00};
      end
      6'd19: if (fetch_instr[10:1] == 10'd16) begin
        take = ctr_ok && cond_ok;
        if (take) next_pc = lr;
      end
      default: ;
    endcase
    fetch_en   = start || (running && fetch_instr != 32'h0);
    fetch_addr = start ? entry : next_pc;
    exec_valid = running;
    exec_addr  = pc_q;
    exec_instr = fetch_instr;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
      pc_q    <= '0;
      ctr     <= '0;
      lr      <= '0;
      cr_lt   <= 1'b0; cr_gt <= 1'b0; cr_eq <= 1'b0;
      n_exec  <= 0;
      for (int i = 0; i < 32; i++) r[i] <= '0;
    end else if (start) begin
      running <= 1'b1;
      done    <= 1'b0;
      pc_q    <= entry;
    end else if (running) begin
      n_exec <= n_exec + 1;
      if (fetch_instr == 32'h0) begin
        running <= 1'b0;
        done    <= 1'b1;
      end else begin
        pc_q <= next_pc;
        case (fetch_instr[31:26])
          6'd14: r[fetch_instr[25:21]] <= (fetch_instr[20:16] == 0 ? 32'h0 : r[fetch_instr[20:16]])
                                          + sext16(fetch_instr[15:0]);
          6'd11: begin
            cr_lt <= $signed(r[fetch_instr[20:16]]) <  $signed(sext16(fetch_instr[15:0]));
            cr_gt <= $signed(r[fetch_instr[20:16]]) >  $signed(sext16(fetch_instr[15:0]));
            cr_eq <= r[fetch_instr[20:16]] == sext16(fetch_instr[15:0]);
          end
          6'd16, 6'd19: begin
            ctr <= ctr_next;
            if (fetch_instr[0]) lr <= pc_q + 4;
          end
          6'd18: if (fetch_instr[0]) lr <= pc_q + 4;
          6'd31: begin
            if (fetch_instr[10:1] == 10'd467 && fetch_instr[20:11] == 10'h120) ctr <= r[fetch_instr[25:21]];
            if (fetch_instr[10:1] == 10'd339 && fetch_instr[20:11] == 10'h120) r[fetch_instr[25:21]] <= ctr;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
