// braille_fpga_top: the stand-alone text-to-Braille translator as it sits on
// the FPGA between two serial lines.
//
// Plain text arrives on uart_rxd at 4800 baud; the serial receiver turns it
// into bytes and strobes each one into the translator. The translator
// collects a word (up to a space), translates it with its grade 2 rule table
// and hands the Braille ASCII codes to the serial transmitter, which sends
// them on uart_txd at 57600 baud. The faster output line lets a word's
// translation leave before the next word has arrived. With load_mode high
// the received bytes replace the rule table instead (40 bytes per rule, see
// data_controller).
//
// Status outputs: busy (a word is being translated or sent), overrun (a
// character was lost, sticky until reset) and frame_error (one-cycle strobe
// for a received byte with a bad stop bit). Reset is active low and
// asynchronous; clk is the 100 MHz board clock.
//
// The receiver / translator / transmitter arrangement, the baud rates and the
// clock follow the design's test system; the status outputs are this
// design's own.
module braille_fpga_top #(
  parameter int CLK_HZ     = 100_000_000,
  parameter int RX_BAUD    = 4800,
  parameter int TX_BAUD    = 57600,
  parameter int MAX_CHARS  = 40,
  parameter int RULE_DEPTH = 512
) (
  input  logic clk,
  input  logic rst_n,
  input  logic uart_rxd,
  output logic uart_txd,
  input  logic load_mode,
  output logic busy,
  output logic overrun,
  output logic frame_error
);

  logic       rx_valid, tx_valid, tx_ready;
  logic [7:0] rx_data, tx_data;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(RX_BAUD)) u_rx (
    .clk, .rst_n, .rx(uart_rxd),
    .valid(rx_valid), .data(rx_data), .frame_error
  );

  translator #(.MAX_CHARS(MAX_CHARS), .RULE_DEPTH(RULE_DEPTH)) u_translator (
    .clk, .rst_n,
    .rx_valid, .rx_data, .load_mode,
    .tx_valid, .tx_data, .tx_ready,
    .busy, .overrun
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(TX_BAUD)) u_tx (
    .clk, .rst_n,
    .valid(tx_valid), .data(tx_data), .ready(tx_ready), .tx(uart_txd)
  );

endmodule
