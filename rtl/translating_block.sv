// translating_block: the eight blocks that turn a group of text characters
// into Braille ASCII codes by applying translation rules.
//
// Data flow for each character position of a group:
//   translating_controller --entry char--> find_entry --first address-->
//   output_rule --rule--> focus_check -> right_context_check ->
//   left_context_check -> load_translated_codes -> output_translated_codes
// with feedback from load_translated_codes to output_rule (try the next rule)
// and to translating_controller (how many characters were translated). The
// rule memory itself (look-up table) sits outside this block: rd_en/rd_addr/
// rd_rule are its read port, and the entry-table maintenance inputs come
// from the data controller while a table is loaded.
//
// Timing: the first rule for a character is presented 3 clocks after the
// entry address; the three checks take a clock each and the verdict one more,
// and a rejected rule is replaced on the next clock because output_rule
// reads ahead, so each rule tried costs 5 clocks. The structure (eight
// blocks, their connections and check order) follows the design's block
// diagram and description.
module translating_block
  import braille_pkg::*;
#(
  parameter  int MAX_CHARS  = 40,
  parameter  int RULE_DEPTH = 512,
  localparam int AW         = $clog2(RULE_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // text characters from the data controller
  input  logic          ch_valid,
  input  char_t         ch_data,
  output logic          ch_ready,
  // look-up table read port
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  rule_t         rd_rule,
  input  logic [AW:0]   n_rules,
  // entry-table maintenance
  input  logic          tbl_clear,
  input  logic          tbl_we,
  input  logic [AW-1:0] tbl_addr,
  input  char_t         tbl_first_char,
  // Braille ASCII codes out
  output logic          tx_valid,
  output char_t         tx_data,
  input  logic          tx_ready,
  output logic          busy
);

  localparam int PW = $clog2(MAX_CHARS + 1);
  localparam int LW = $clog2(FIELD_LEN + 1);

  char_t         text [MAX_CHARS];
  logic [PW-1:0] len, pos;
  logic          entry_valid, addr_ready, fe_fail;
  char_t         entry_char, entry_char_q, fail_char;
  logic [AW-1:0] entry_addr;
  rule_t         rule;
  logic          rule_valid, exhausted, rule_fired, rule_fail;
  char_t         exhausted_char;
  logic          f_done, f_match, r_done, r_match, l_done, l_match;
  logic [LW-1:0] flen, consumed_count;
  logic          code_valid, consumed, flush, flush_done;
  char_t         code;

  translating_controller #(.MAX_CHARS(MAX_CHARS)) u_ctrl (
    .clk, .rst_n,
    .ch_valid, .ch_data, .ch_ready,
    .text, .len, .pos,
    .entry_valid, .entry_char,
    .fail(fe_fail), .consumed, .consumed_count,
    .flush, .flush_done, .busy
  );

  find_entry #(.RULE_DEPTH(RULE_DEPTH)) u_find (
    .clk, .rst_n,
    .entry_valid, .entry_char,
    .addr_ready, .entry_addr, .entry_char_q,
    .fail(fe_fail), .fail_char,
    .tbl_clear, .tbl_we, .tbl_addr, .tbl_first_char
  );

  output_rule #(.RULE_DEPTH(RULE_DEPTH)) u_rule (
    .clk, .rst_n,
    .addr_ready, .entry_addr, .entry_char(entry_char_q),
    .n_rules,
    .rd_en, .rd_addr, .rd_rule,
    .rule, .rule_valid, .exhausted, .exhausted_char,
    .rule_fired, .rule_fail
  );

  focus_check #(.MAX_CHARS(MAX_CHARS)) u_focus (
    .clk, .rst_n,
    .rule_valid, .focus(rule.focus),
    .text, .len, .pos,
    .done(f_done), .match(f_match), .flen
  );

  right_context_check #(.MAX_CHARS(MAX_CHARS)) u_right (
    .clk, .rst_n,
    .f_done, .f_match, .flen, .right(rule.right),
    .text, .len, .pos,
    .done(r_done), .match(r_match)
  );

  left_context_check #(.MAX_CHARS(MAX_CHARS)) u_left (
    .clk, .rst_n,
    .r_done, .r_match, .left(rule.left),
    .text, .pos,
    .done(l_done), .match(l_match)
  );

  load_translated_codes u_load (
    .clk, .rst_n,
    .rule_valid, .rule_codes(rule.codes),
    .exhausted, .exhausted_char,
    .l_done, .l_match, .flen,
    .code_valid, .code,
    .consumed, .consumed_count,
    .rule_fired, .rule_fail
  );

  output_translated_codes #(.MAX_CHARS(MAX_CHARS)) u_out (
    .clk, .rst_n,
    .code_valid, .code,
    .fail_valid(fe_fail), .fail_char,
    .flush, .flush_done,
    .tx_valid, .tx_data, .tx_ready
  );

endmodule
