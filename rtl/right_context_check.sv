// right_context_check: second of the three rule checks. Compares the right
// context of the current rule with the text that follows the focus.
//
// It starts when the focus check is done (f_done). If the focus did not
// match, the failure is simply passed on. Otherwise each right-context
// character, up to the first ASCII 0, is held against the text character at
// the same offset after the focus (pos + flen + i): a literal must be equal,
// and a wildcard ('~' boundary, '!' letter, '#' digit, see braille_pkg) must
// accept it. Positions past the stored text count as a word boundary. An
// empty right context always matches.
//
// Timing: `done` rises one cycle after f_done, for one cycle; `match` holds
// until the next verdict. The check order (focus, then right context, then
// left context) follows the design description; the single-cycle parallel
// comparison is this design's choice.
module right_context_check
  import braille_pkg::*;
#(
  parameter  int MAX_CHARS = 40,
  localparam int PW        = $clog2(MAX_CHARS + 1),
  localparam int LW        = $clog2(FIELD_LEN + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          f_done,
  input  logic          f_match,
  input  logic [LW-1:0] flen,
  input  field_t        right,
  input  char_t         text [MAX_CHARS],
  input  logic [PW-1:0] len,
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
        if (right[i] == 8'h00) begin
          stop = 1'b1;
        end else begin
          idx     = int'(pos) + int'(flen) + i;
          present = (idx < int'(len)) && (idx < MAX_CHARS);
          c       = present ? text[idx] : 8'h00;
          if (!ctx_match(right[i], present, c)) m = 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done  <= 1'b0;
      match <= 1'b0;
    end else begin
      done <= f_done;
      if (f_done) match <= f_match && m;
    end
  end

endmodule
