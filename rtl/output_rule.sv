// output_rule: reads the rules for one entry character and offers them, one
// at a time, to the check blocks.
//
// When find-entry reports a first address (addr_ready), the block reads that
// rule from the look-up table and presents it on `rule` with a one-cycle
// rule_valid strobe to the focus, right-context, left-context and
// load-translated-codes blocks. It then waits for the verdict fed back by
// load-translated-codes: rule_fired ends the search, rule_fail makes it
// present the next rule. Two things go on at once here: while the checks
// work on the presented rule, the block already reads the following rule
// from the table (prefetch), so a rejected rule is replaced on the very next
// clock. The search also ends, with an `exhausted` strobe carrying the entry
// character, when the next rule belongs to another character (its focus
// starts differently) or lies past the last loaded rule (n_rules);
// load-translated-codes then emits the character untranslated.
//
// Timing: the first rule is presented 3 clocks after addr_ready (request,
// synchronous memory, register); each further rule 1 clock after rule_fail.
// The prefetch read is issued on the clock after rule_valid, so the feedback
// must come at least 2 clocks after rule_valid (the three checks take 3).
// `rule` stays stable from rule_valid until the next rule is presented.
//
// Stepping through the rules on a failure feedback and reading rules while
// sending them follow the design description; the one-rule prefetch, the
// end-of-group test and the exhausted path are this design's choices.
module output_rule
  import braille_pkg::*;
#(
  parameter  int RULE_DEPTH = 512,
  localparam int AW         = $clog2(RULE_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // from find-entry
  input  logic          addr_ready,
  input  logic [AW-1:0] entry_addr,
  input  char_t         entry_char,
  // number of valid rules in the look-up table
  input  logic [AW:0]   n_rules,
  // look-up table read port
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  rule_t         rd_rule,
  // to the check blocks and load-translated-codes
  output rule_t         rule,
  output logic          rule_valid,
  output logic          exhausted,
  output char_t         exhausted_char,
  // feedback from load-translated-codes
  input  logic          rule_fired,
  input  logic          rule_fail
);

  typedef enum logic [1:0] {IDLE, READ, WAIT_MEM, CHECK} state_t;

  state_t        state;
  logic [AW:0]   addr;       // one bit wider, so that the end of memory is seen
  logic [AW:0]   next_addr;
  char_t         ch;
  logic          prefetch;   // read the rule after `addr` this cycle
  logic          pf_issue;   // first CHECK cycle of a presented rule
  logic          next_ok;    // the prefetched address lies inside the table
  logic          fb_early;   // feedback on the prefetch cycle (not allowed)

  assign next_addr = addr + 1'b1;
  assign prefetch  = (state == CHECK) && pf_issue;
  assign rd_en     = ((state == READ) && (addr < n_rules)) || (prefetch && (next_addr < n_rules));
  assign rd_addr   = (state == READ) ? addr[AW-1:0] : next_addr[AW-1:0];
  assign fb_early  = prefetch && (rule_fail || rule_fired);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= IDLE;
      addr           <= '0;
      ch             <= '0;
      rule           <= '0;
      rule_valid     <= 1'b0;
      exhausted      <= 1'b0;
      exhausted_char <= '0;
      pf_issue       <= 1'b0;
      next_ok        <= 1'b0;
    end else begin
      rule_valid <= 1'b0;
      exhausted  <= 1'b0;
      unique case (state)
        IDLE: if (addr_ready) begin
          addr  <= {1'b0, entry_addr};
          ch    <= entry_char;
          state <= READ;
        end
        READ: begin
          if (addr < n_rules) begin
            state <= WAIT_MEM;
          end else begin
            exhausted      <= 1'b1;
            exhausted_char <= ch;
            state          <= IDLE;
          end
        end
        WAIT_MEM: begin
          if (rd_rule.focus[0] == ch) begin
            rule       <= rd_rule;
            rule_valid <= 1'b1;
            pf_issue   <= 1'b1;
            state      <= CHECK;
          end else begin
            exhausted      <= 1'b1;
            exhausted_char <= ch;
            state          <= IDLE;
          end
        end
        CHECK: begin
          if (prefetch) begin
            pf_issue <= 1'b0;
            next_ok  <= (next_addr < n_rules);
          end else if (rule_fired) begin
            state <= IDLE;
          end else if (rule_fail) begin
            // rd_rule now holds the prefetched rule at addr + 1
            if (next_ok && rd_rule.focus[0] == ch) begin
              rule       <= rd_rule;
              rule_valid <= 1'b1;
              addr       <= next_addr;
              pf_issue   <= 1'b1;
            end else begin
              exhausted      <= 1'b1;
              exhausted_char <= ch;
              state          <= IDLE;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The verdict on a rule cannot come before its successor has been read.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_feedback_after_prefetch: assert (!fb_early)
        else $error("rule feedback on the cycle the next rule is read");
    end
  end

endmodule
