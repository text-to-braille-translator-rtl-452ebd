// tb_uart_tx: at the default 100 MHz clock and 57600 baud, sends random
// bytes and decodes the line independently: start bit, eight data bits LSB
// first and stop bit, each sampled in the middle of a 1736-clock bit period
// (100e6/57600 rounded). Checks that `ready` returns exactly ten bit periods
// after a byte is taken and that the line idles high.
module tb_uart_tx;
  localparam int CLK_HZ = 100_000_000;
  localparam int BAUD   = 57600;
  localparam int BIT    = 1736;

  logic       clk = 0, rst_n = 0;
  logic       valid = 0;
  logic [7:0] data = '0;
  logic       ready, tx;
  int         checks = 0, failures = 0;

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    check(tx && ready, "idle line high, ready");
    for (int k = 0; k < 16; k++) begin
      logic [7:0] b, got;
      int cyc;
      b = (k == 0) ? 8'h00 : (k == 1) ? 8'hFF : 8'($urandom);
      @(negedge clk);
      check(ready, "ready before a byte");
      valid = 1; data = b;
      @(negedge clk);
      valid = 0; data = ~b;
      // now half a clock after the edge that took the byte
      repeat (BIT / 2 - 1) @(negedge clk);
      check(!tx, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(negedge clk);
        got[i] = tx;
      end
      repeat (BIT) @(negedge clk);
      check(tx, "stop bit");
      check(got == b, $sformatf("byte %02h sent as %02h", b, got));
      // ready must come back 10*BIT clocks after the byte was taken
      cyc = BIT / 2 + 9 * BIT;
      while (!ready && cyc < 12 * BIT) begin @(negedge clk); cyc++; end
      check(cyc - 1 == 10 * BIT, $sformatf("frame lasted %0d clocks, want %0d", cyc - 1, 10 * BIT));
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
