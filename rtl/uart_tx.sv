// uart_tx: serial transmitter, 8 data bits, no parity, 1 stop bit, LSB first.
//
// A byte is taken when `valid` and `ready` are both high; `ready` is high
// only while the transmitter is idle. The frame (start bit 0, data bits LSB
// first, stop bit 1) is then shifted out on `tx`, each bit lasting
// CLK_HZ/BAUD clocks (rounded), so one byte occupies 10 bit periods. The
// line idles high.
//
// The 100 MHz clock and the 57600 baud output rate follow the test system of
// the design; the frame format and the handshake are this design's choices.
module uart_tx #(
  parameter int CLK_HZ = 100_000_000,
  parameter int BAUD   = 57600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       tx
);

  localparam int DIV = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int CW  = $clog2(DIV + 1);

  logic [CW-1:0] cnt;
  logic [3:0]    bits_left;
  logic [8:0]    frame;      // data bits then the stop bit, shifted out LSB first

  assign ready = (bits_left == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      bits_left <= '0;
      frame     <= '1;
      tx        <= 1'b1;
    end else if (bits_left == 0) begin
      tx <= 1'b1;
      if (valid) begin
        tx        <= 1'b0;
        cnt       <= CW'(DIV - 1);
        bits_left <= 4'd10;
        frame     <= {1'b1, data};
      end
    end else if (cnt != 0) begin
      cnt <= cnt - 1'b1;
    end else begin
      bits_left <= bits_left - 1'b1;
      cnt       <= CW'(DIV - 1);
      tx        <= frame[0];
      frame     <= {1'b1, frame[8:1]};
    end
  end

endmodule
