// focus_check: first of the three rule checks. Compares the focus of the
// current rule with the text at the entry position.
//
// The focus is one or more characters, ended by an ASCII 0 or by the end of
// its field. It matches when every focus character equals the text character
// at the same offset from `pos`, all of them lying inside the stored text.
// An empty focus never matches. On the cycle after rule_valid the block
// raises `done` for one cycle with `match` and the focus length `flen`
// (number of text characters the rule would translate); `match` and `flen`
// then hold until the next rule. The verdict is passed on to the
// right-context check, which only looks further if the focus matched.
//
// The comparison is done in parallel over all FIELD_LEN focus characters in
// one cycle (this design's choice; the description gives the function).
module focus_check
  import braille_pkg::*;
#(
  parameter  int MAX_CHARS = 40,
  localparam int PW        = $clog2(MAX_CHARS + 1),
  localparam int LW        = $clog2(FIELD_LEN + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rule_valid,
  input  field_t        focus,
  input  char_t         text [MAX_CHARS],
  input  logic [PW-1:0] len,
  input  logic [PW-1:0] pos,
  output logic          done,
  output logic          match,
  output logic [LW-1:0] flen
);

  logic          m;
  logic [LW-1:0] n;

  always_comb begin
    logic stop;
    int   idx;
    m    = 1'b1;
    idx  = 0;
    n    = '0;
    stop = 1'b0;
    for (int i = 0; i < FIELD_LEN; i++) begin
      if (!stop) begin
        if (focus[i] == 8'h00) begin
          stop = 1'b1;
        end else begin
          idx = int'(pos) + i;
          if (idx >= int'(len) || idx >= MAX_CHARS) m = 1'b0;
          else if (text[idx] != focus[i])           m = 1'b0;
          n = n + 1'b1;
        end
      end
    end
    if (n == '0) m = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done  <= 1'b0;
      match <= 1'b0;
      flen  <= '0;
    end else begin
      done <= rule_valid;
      if (rule_valid) begin
        match <= m;
        flen  <= n;
      end
    end
  end

endmodule
