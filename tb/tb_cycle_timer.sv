// tb_cycle_timer: checks that the cycle timer counts enabled clock edges,
// holds while disabled, restarts on clear and resets to zero.
module tb_cycle_timer;
  logic clk = 0, rst_n = 0, clear = 0, enable = 0;
  logic [31:0] now;
  int checks = 0, failures = 0;
  longint expect_v;

  cycle_timer #(.TS_W(32)) dut (.clk, .rst_n, .clear, .enable, .now);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_v = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (now !== 0) begin failures++; $display("reset value %0d", now); end
    for (int k = 0; k < 2000; k++) begin
      enable = ($urandom % 4) != 0;
      clear  = ($urandom % 97) == 0;
      @(posedge clk);
      if (clear) expect_v = 0;
      else if (enable) expect_v = (expect_v + 1) % 64'h1_0000_0000;
      #1;
      checks++;
      if (now !== 32'(expect_v)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: now=%0d expected %0d", k, now, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
