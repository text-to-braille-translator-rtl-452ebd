// find_entry: maps the entry character to the address of its first rule.
//
// The rules in the look-up table are grouped by the first character of their
// focus. This block keeps a table, indexed by the 7-bit ASCII entry
// character, of where each group begins. When the translating controller
// presents an entry character (entry_valid), the block answers one clock
// later with either addr_ready and the group's first address (passed on to
// the output-rule block together with the character), or fail and the
// character itself (passed on to the output-translated-codes block, which
// emits it unchanged, and to the translating controller, which steps over it).
//
// The table resets to the groups of the built-in rule table. When another
// rule table is loaded, tbl_clear empties it and every rule write
// (tbl_we, tbl_addr, tbl_first_char) is watched: the first rule written for a
// character becomes that character's entry. Rules must therefore be loaded
// grouped by first focus character, each group in the order its rules are to
// be tried.
//
// Looking entries up in a table of addresses follows the design description;
// building the table by watching rule writes is this design's choice.
module find_entry
  import braille_pkg::*;
#(
  parameter  int RULE_DEPTH = 512,
  localparam int AW         = $clog2(RULE_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the translating controller
  input  logic          entry_valid,
  input  char_t         entry_char,
  // to the output-rule block
  output logic          addr_ready,
  output logic [AW-1:0] entry_addr,
  output char_t         entry_char_q,
  // to the output-translated-codes block and the translating controller
  output logic          fail,
  output char_t         fail_char,
  // entry-table maintenance while a rule table is loaded
  input  logic          tbl_clear,
  input  logic          tbl_we,
  input  logic [AW-1:0] tbl_addr,
  input  char_t         tbl_first_char
);

  typedef struct packed {
    logic          valid;
    logic [AW-1:0] addr;
  } entry_t;

  typedef entry_t [ENTRY_CHARS-1:0] entry_table_t;

  // Entry table of the built-in rule table: first rule of each character.
  function automatic entry_table_t default_table();
    entry_table_t t;
    rule_t        r;
    t = '0;
    for (int i = N_DEFAULT_RULES - 1; i >= 0; i--) begin
      r = default_rule(i);
      if (i < RULE_DEPTH && r.focus[0] != 8'h00 && !r.focus[0][7]) begin
        t[r.focus[0][6:0]].valid = 1'b1;
        t[r.focus[0][6:0]].addr  = AW'(i);
      end
    end
    return t;
  endfunction

  localparam entry_table_t DEFAULT_TABLE = default_table();

  entry_t table_q [ENTRY_CHARS];
  entry_t hit;

  assign hit = table_q[entry_char[6:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < ENTRY_CHARS; c++) table_q[c] <= DEFAULT_TABLE[c];
    end else if (tbl_clear) begin
      for (int c = 0; c < ENTRY_CHARS; c++) table_q[c] <= '0;
    end else if (tbl_we && tbl_first_char != 8'h00 && !tbl_first_char[7]) begin
      if (!table_q[tbl_first_char[6:0]].valid)
        table_q[tbl_first_char[6:0]] <= '{valid: 1'b1, addr: tbl_addr};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_ready   <= 1'b0;
      fail         <= 1'b0;
      entry_addr   <= '0;
      entry_char_q <= '0;
      fail_char    <= '0;
    end else begin
      addr_ready <= 1'b0;
      fail       <= 1'b0;
      if (entry_valid) begin
        if (!entry_char[7] && hit.valid) begin
          addr_ready   <= 1'b1;
          entry_addr   <= hit.addr;
          entry_char_q <= entry_char;
        end else begin
          fail      <= 1'b1;
          fail_char <= entry_char;
        end
      end
    end
  end

endmodule
