// left_context_check: last of the three rule checks. Compares the left
// context of the current rule with the text in front of the focus.
//
// It starts when the right-context check is done (r_done) and passes a
// failure straight on. Otherwise each left-context character, stored
// nearest-first (left[0] is held against the character at pos-1, left[1]
// against pos-2, ...) up to the first ASCII 0, must equal the text character
// or be a wildcard that accepts it ('~' boundary, '!' letter, '#' digit).
// Positions before the first stored character count as a word boundary. An
// empty left context always matches.
//
// Timing: `done` rises one cycle after r_done, for one cycle; `match` is the
// verdict of the whole rule and holds until the next one. It goes to the
// load-translated-codes block. Checking the left context last follows the
// design description; storing it nearest-first is this design's choice.
module left_context_check
  import braille_pkg::*;
#(
  parameter  int MAX_CHARS = 40,
  localparam int PW        = $clog2(MAX_CHARS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          r_done,
  input  logic          r_match,
  input  field_t        left,
  input  char_t         text [MAX_CHARS],
  input  logic [PW-1:0] pos,
  output logic          done,
  output logic          match
);

  logic m;

  always_comb begin
    logic  stop;
    logic  present;
    char_t c;
    int    idx;
    m    = 1'b1;
    idx  = 0;
    present = 1'b0;
    c    = '0;
    stop = 1'b0;
    for (int i = 0; i < FIELD_LEN; i++) begin
      if (!stop) begin
        if (left[i] == 8'h00) begin
          stop = 1'b1;
        end else begin
          idx     = int'(pos) - 1 - i;
          present = (idx >= 0) && (idx < MAX_CHARS);
          c       = present ? text[idx] : 8'h00;
          if (!ctx_match(left[i], present, c)) m = 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done  <= 1'b0;
      match <= 1'b0;
    end else begin
      done <= r_done;
      if (r_done) match <= r_match && m;
    end
  end

endmodule
