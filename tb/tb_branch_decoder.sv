// tb_branch_decoder: drives random instruction words, including many branch
// encodings, into two decoders - the default one (backward "b", the loop
// detector) and one set up to trace function calls ("bl", any direction) -
// and compares hit, target and body size with values computed here from the
// PowerPC encoding.
module tb_branch_decoder;
  import profiler_pkg::*;
  logic   valid;
  addr_t  addr;
  instr_t instr;
  logic   hit_l, hit_c;
  addr_t  tgt_l, tgt_c;
  size_t  size_l, size_c;
  int checks = 0, failures = 0;
  int n_loop_hits = 0, n_call_hits = 0;

  branch_decoder dut_loop (.valid, .addr, .instr, .hit(hit_l), .target(tgt_l), .body_size(size_l));
  branch_decoder #(.MATCH_MASK(B_MASK), .MATCH_VALUE(BL_VALUE), .BACKWARD_ONLY(1'b0))
    dut_call (.valid, .addr, .instr, .hit(hit_c), .target(tgt_c), .body_size(size_c));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %h expected %h (instr %h addr %h)", what, got, exp, instr, addr);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 20000; k++) begin
      longint disp, tgt, d;
      bit is_b, is_bl, aa, back;
      int kind;
      kind  = $urandom % 4;
      valid = ($urandom % 8) != 0;
      addr  = 32'($urandom) & 32'hFFFF_FFFC;
      if (kind == 0) instr = $urandom;
      else begin
        // opcode 18 with random LI, AA, LK; small displacements most of the time
        logic [23:0] li;
        li = (kind == 1) ? 24'($urandom) : 24'($signed(($urandom % 512)) - 256);
        instr = {6'd18, li, 1'($urandom % 8 == 0), 1'($urandom % 2)};
      end
      #1;
      aa    = instr[1];
      disp  = longint'($signed({instr[25:2], 2'b00}));
      tgt   = aa ? (disp & 64'hFFFF_FFFF) : ((longint'(addr) + disp) & 64'hFFFF_FFFF);
      is_b  = instr[31:26] == 6'd18 && instr[1:0] == 2'b00;
      is_bl = instr[31:26] == 6'd18 && instr[1:0] == 2'b01;
      back  = tgt <= longint'(addr) && (aa || disp <= 0);
      d     = longint'(addr) - tgt;
      check("loop hit", hit_l, valid && is_b && back);
      check("call hit", hit_c, valid && is_bl);
      check("target", tgt_l, tgt);
      check("call target", tgt_c, tgt);
      check("body size", size_l, back ? ((d > 65535) ? 65535 : d) : 0);
      if (hit_l) n_loop_hits++;
      if (hit_c) n_call_hits++;
    end
    checks++;
    if (n_loop_hits < 100 || n_call_hits < 100) begin
      failures++;
      $display("too few hits: loop %0d call %0d", n_loop_hits, n_call_hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
