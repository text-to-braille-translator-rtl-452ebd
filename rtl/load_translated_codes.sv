// load_translated_codes: acts on the verdict of the three checks.
//
// Whenever the output-rule block presents a rule (rule_valid), this block
// copies the rule's output codes into its own registers. When the
// left-context check is done (l_done):
//   * the rule fired (l_match): the stored codes are written, one per clock,
//     up to the first ASCII 0, to the output-translated-codes block
//     (code_valid/code); then `consumed` tells the translating controller how
//     many text characters were translated (the focus length) and rule_fired
//     tells the output-rule block to stop;
//   * the rule failed: rule_fail makes the output-rule block fetch the next
//     rule.
// When the output-rule block runs out of rules for a character (exhausted),
// the character is written unchanged and one character is reported consumed.
//
// Timing: rule_fail one cycle after l_done; for a fired rule with k codes,
// the codes on the k cycles after l_done and `consumed`/rule_fired on the
// cycle after the last code. Holding the codes and feeding back the number of
// translated characters follow the design description; writing one code per
// clock and the exhausted path are this design's choices.
module load_translated_codes
  import braille_pkg::*;
#(
  localparam int LW = $clog2(FIELD_LEN + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the output-rule block
  input  logic          rule_valid,
  input  field_t        rule_codes,
  input  logic          exhausted,
  input  char_t         exhausted_char,
  // from the checks
  input  logic          l_done,
  input  logic          l_match,
  input  logic [LW-1:0] flen,
  // to the output-translated-codes block
  output logic          code_valid,
  output char_t         code,
  // feedback to the translating controller
  output logic          consumed,
  output logic [LW-1:0] consumed_count,
  // feedback to the output-rule block
  output logic          rule_fired,
  output logic          rule_fail
);

  typedef enum logic [1:0] {IDLE, EMIT, REPORT} state_t;

  state_t        state;
  field_t        codes_q;
  logic [LW-1:0] idx;
  logic [LW-1:0] count_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= IDLE;
      codes_q        <= '0;
      idx            <= '0;
      count_q        <= '0;
      code_valid     <= 1'b0;
      code           <= '0;
      consumed       <= 1'b0;
      consumed_count <= '0;
      rule_fired     <= 1'b0;
      rule_fail      <= 1'b0;
    end else begin
      code_valid <= 1'b0;
      consumed   <= 1'b0;
      rule_fired <= 1'b0;
      rule_fail  <= 1'b0;
      if (rule_valid) codes_q <= rule_codes;
      unique case (state)
        IDLE: begin
          if (l_done) begin
            if (l_match) begin
              idx     <= '0;
              count_q <= flen;
              state   <= EMIT;
            end else begin
              rule_fail <= 1'b1;
            end
          end else if (exhausted) begin
            code_valid <= 1'b1;
            code       <= exhausted_char;
            count_q    <= LW'(1);
            state      <= REPORT;
          end
        end
        EMIT: begin
          if (int'(idx) < FIELD_LEN && codes_q[idx] != 8'h00) begin
            code_valid <= 1'b1;
            code       <= codes_q[idx];
            idx        <= idx + 1'b1;
          end else begin
            consumed       <= 1'b1;
            consumed_count <= count_q;
            rule_fired     <= 1'b1;
            state          <= IDLE;
          end
        end
        REPORT: begin
          consumed       <= 1'b1;
          consumed_count <= count_q;
          state          <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
