// translating_controller: stores the text of one group and walks through it.
//
// In COLLECT it accepts characters from the data controller (ch_valid/
// ch_ready) into MAX_CHARS registers. A space, a carriage return or a line
// feed ends the group (the delimiter is stored and translated too), and so
// does a full buffer. The block then translates the group from position 0:
// it sends the character at the current position to find-entry
// (entry_valid/entry_char) and waits for feedback. If find-entry has no rules
// for it (fail), the position advances by one; if a rule fired,
// load-translated-codes reports how many characters it translated (consumed,
// consumed_count) and the position advances by that many, skipping the
// translated characters. When the position reaches the end of the group it
// asks output-translated-codes to send the codes (flush), waits for
// flush_done and starts collecting the next group.
//
// The whole text (text, len) and the position (pos) are outputs: the focus,
// right-context and left-context checks read them directly. They are stable
// while a character is being translated.
//
// The 40-character buffer, the position feedback and waiting for a space
// follow the design description; treating CR and LF as delimiters and
// starting early on a full buffer are this design's choices.
module translating_controller
  import braille_pkg::*;
#(
  parameter  int MAX_CHARS = 40,
  localparam int PW        = $clog2(MAX_CHARS + 1),
  localparam int LW        = $clog2(FIELD_LEN + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the data controller
  input  logic          ch_valid,
  input  char_t         ch_data,
  output logic          ch_ready,
  // the stored group, for the check blocks
  output char_t         text [MAX_CHARS],
  output logic [PW-1:0] len,
  output logic [PW-1:0] pos,
  // to find-entry
  output logic          entry_valid,
  output char_t         entry_char,
  // feedback
  input  logic          fail,
  input  logic          consumed,
  input  logic [LW-1:0] consumed_count,
  // to output-translated-codes
  output logic          flush,
  input  logic          flush_done,
  output logic          busy
);

  typedef enum logic [1:0] {COLLECT, ISSUE, WAIT, FLUSH} state_t;

  state_t state;

  function automatic logic is_delimiter(char_t c);
    return c == 8'h20 || c == 8'h0D || c == 8'h0A;
  endfunction

  assign ch_ready = (state == COLLECT);
  assign busy     = (state != COLLECT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= COLLECT;
      for (int i = 0; i < MAX_CHARS; i++) text[i] <= '0;
      len         <= '0;
      pos         <= '0;
      entry_valid <= 1'b0;
      entry_char  <= '0;
      flush       <= 1'b0;
    end else begin
      entry_valid <= 1'b0;
      flush       <= 1'b0;
      unique case (state)
        COLLECT: begin
          if (ch_valid) begin
            text[len[PW-1:0]] <= ch_data;
            len               <= len + 1'b1;
            if (is_delimiter(ch_data) || int'(len) == MAX_CHARS - 1) begin
              pos   <= '0;
              state <= ISSUE;
            end
          end
        end
        ISSUE: begin
          if (pos >= len) begin
            flush <= 1'b1;
            state <= FLUSH;
          end else begin
            entry_valid <= 1'b1;
            entry_char  <= text[pos];
            state       <= WAIT;
          end
        end
        WAIT: begin
          if (fail) begin
            pos   <= pos + 1'b1;
            state <= ISSUE;
          end else if (consumed) begin
            pos   <= pos + PW'(consumed_count);
            state <= ISSUE;
          end
        end
        FLUSH: begin
          if (flush_done) begin
            len   <= '0;
            pos   <= '0;
            for (int i = 0; i < MAX_CHARS; i++) text[i] <= '0;
            state <= COLLECT;
          end
        end
        default: state <= COLLECT;
      endcase
    end
  end

endmodule
