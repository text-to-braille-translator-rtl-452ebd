// translator: the complete text-to-Braille translator.
//
// Text characters (rx_valid/rx_data, one byte per strobe) go through the data
// controller into the translating block, which collects them up to a space
// (or 40 characters), translates the group with the rules held in the
// look-up table and then sends the Braille ASCII codes out on a valid/ready
// stream (tx_valid/tx_data/tx_ready). While load_mode is high, received bytes
// are instead written into the look-up table as rules (see data_controller).
// `busy` is high while a group is being translated or sent; `overrun` is a
// sticky flag for a character lost because the translator was busy.
//
// The partition into data controller, look-up table and translating block
// follows the design's block diagram.
module translator
  import braille_pkg::*;
#(
  parameter int MAX_CHARS  = 40,
  parameter int RULE_DEPTH = 512
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rx_valid,
  input  char_t rx_data,
  input  logic  load_mode,
  output logic  tx_valid,
  output char_t tx_data,
  input  logic  tx_ready,
  output logic  busy,
  output logic  overrun
);

  localparam int AW = $clog2(RULE_DEPTH);

  logic          ch_valid, ch_ready;
  char_t         ch_data;
  logic          tbl_clear, tbl_we;
  logic [AW-1:0] tbl_addr;
  rule_t         tbl_rule;
  logic [AW:0]   n_rules;
  logic          rd_en;
  logic [AW-1:0] rd_addr;
  rule_t         rd_rule;

  data_controller #(.RULE_DEPTH(RULE_DEPTH)) u_data (
    .clk, .rst_n,
    .rx_valid, .rx_data, .load_mode,
    .ch_valid, .ch_data, .ch_ready, .overrun,
    .tbl_clear, .tbl_we, .tbl_addr, .tbl_rule, .n_rules
  );

  lookup_table #(.DEPTH(RULE_DEPTH)) u_lut (
    .clk,
    .rd_en, .rd_addr, .rd_rule,
    .wr_en(tbl_we), .wr_addr(tbl_addr), .wr_rule(tbl_rule)
  );

  translating_block #(.MAX_CHARS(MAX_CHARS), .RULE_DEPTH(RULE_DEPTH)) u_block (
    .clk, .rst_n,
    .ch_valid, .ch_data, .ch_ready,
    .rd_en, .rd_addr, .rd_rule, .n_rules,
    .tbl_clear, .tbl_we, .tbl_addr, .tbl_first_char(tbl_rule.focus[0]),
    .tx_valid, .tx_data, .tx_ready, .busy
  );

endmodule
