// tb_program_bram: writes random words through the load port and reads them
// back through the fetch port, checking contents and the one-cycle read
// latency, and that the output holds while rd_en is low.
module tb_program_bram;
  localparam int unsigned W = 256;
  logic clk = 0, rd_en = 0, we = 0;
  logic [31:0] rd_addr = 0, rd_data, wr_addr = 0, wr_data = 0;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  program_bram #(.MEM_WORDS(W)) dut (.clk, .rd_en, .rd_addr, .rd_data, .we, .wr_addr, .wr_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      we = 1; wr_addr = 32'(i * 4); wr_data = $urandom; model[i] = wr_data;
    end
    @(negedge clk) we = 0;
    for (int k = 0; k < 1000; k++) begin
      int a;
      logic [31:0] held;
      a = $urandom % W;
      @(negedge clk);
      rd_en = 1; rd_addr = 32'(a * 4) | 32'($urandom % 4) | (32'($urandom % 4) << 10);
      // a write to another word in the same cycle must not disturb the read
      we = 1; wr_addr = 32'(((a + 1) % W) * 4); wr_data = $urandom;
      @(posedge clk); #1;
      model[(a + 1) % W] = wr_data;
      checks++;
      if (rd_data !== model[a]) begin
        failures++;
        if (failures < 10) $display("read %0d: got %h expected %h", a, rd_data, model[a]);
      end
      held = rd_data;
      @(negedge clk) rd_en = 0; we = 0; rd_addr = 32'(($urandom % W) * 4);
      @(posedge clk); #1;
      checks++;
      if (rd_data !== held) begin failures++; $display("output changed without rd_en"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
