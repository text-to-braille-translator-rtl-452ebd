// Serial line helpers for the system testbenches: a sender that drives
// 8N1 frames on uart_rxd and a receiver process that decodes uart_txd into
// the string `line_out`. RX_BIT and TX_BIT are bit periods in clocks,
// worked out here from the clock and baud rates (rounded to nearest).

task automatic serial_send(input byte b);
  @(negedge clk); uart_rxd = 0; repeat (RX_BIT - 1) @(negedge clk);
  for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (RX_BIT) @(negedge clk); end
  uart_rxd = 1; repeat (RX_BIT) @(negedge clk);
endtask

string line_out = "";
int    n_serial_errors = 0;

initial begin
  byte b;
  @(posedge rst_n);
  forever begin
    @(negedge uart_txd);
    repeat (TX_BIT / 2) @(posedge clk);
    if (uart_txd) continue;                      // not a start bit
    for (int i = 0; i < 8; i++) begin
      repeat (TX_BIT) @(posedge clk);
      b[i] = uart_txd;
    end
    repeat (TX_BIT) @(posedge clk);
    if (!uart_txd) n_serial_errors++;
    line_out = {line_out, string'(b)};
  end
end
