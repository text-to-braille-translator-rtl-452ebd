// tb_uart_rx: at the default 100 MHz clock and 4800 baud, drives serial
// frames (bit period 20833 clocks, 100e6/4800 rounded) and checks the
// received bytes; frames sent 2 % fast and 2 % slow must still be read; a
// low stop bit must give frame_error and no byte; a short low glitch must not
// start a frame.
module tb_uart_rx;
  localparam int CLK_HZ = 100_000_000;
  localparam int BAUD   = 4800;
  localparam int BIT    = 20833;

  logic       clk = 0, rst_n = 0;
  logic       rx = 1;
  logic       valid, frame_error;
  logic [7:0] data;
  int         checks = 0, failures = 0;
  int         n_valid = 0, n_ferr = 0;
  logic [7:0] last;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && valid) begin n_valid++; last = data; end
    if (rst_n && frame_error) n_ferr++;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
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

  task automatic frame(input logic [7:0] b, input int bit_clks, input logic stop);
    @(negedge clk); rx = 0; repeat (bit_clks - 1) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (bit_clks) @(negedge clk); end
    rx = stop; repeat (bit_clks) @(negedge clk);
    rx = 1; repeat (bit_clks / 2) @(negedge clk);
  endtask

  initial begin
    int v, f;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);
    for (int k = 0; k < 12; k++) begin
      logic [7:0] b;
      int period;
      b = (k == 0) ? 8'h00 : (k == 1) ? 8'hFF : 8'($urandom);
      period = (k % 3 == 0) ? BIT : (k % 3 == 1) ? BIT * 98 / 100 : BIT * 102 / 100;
      v = n_valid;
      frame(b, period, 1'b1);
      check(n_valid == v + 1 && last == b, $sformatf("byte %02h received (got %02h)", b, last));
    end
    v = n_valid; f = n_ferr;
    frame(8'h55, BIT, 1'b0);
    check(n_valid == v && n_ferr == f + 1, "low stop bit gives frame_error");
    repeat (2 * BIT) @(negedge clk);   // line idle again
    v = n_valid; f = n_ferr;
    rx = 0; repeat (BIT / 8) @(negedge clk); rx = 1;
    repeat (12 * BIT) @(negedge clk);
    check(n_valid == v && n_ferr == f, "glitch ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
