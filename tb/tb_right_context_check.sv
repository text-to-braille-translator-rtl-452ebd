// tb_right_context_check: random texts, positions, focus lengths and right
// contexts (literals and the '~', '!', '#' wildcards) against a reference
// model; a failed focus must be passed on as a failure. Checks the one-cycle
// latency as well.
module tb_right_context_check;
  import braille_pkg::*;

  localparam int MAX_CHARS = 40;
  localparam int PW = $clog2(MAX_CHARS + 1);
  localparam int LW = $clog2(FIELD_LEN + 1);

  logic          clk = 0, rst_n = 0;
  logic          f_done = 0, f_match = 0;
  logic [LW-1:0] flen = '0;
  field_t        right = '0;
  char_t         text [MAX_CHARS];
  logic [PW-1:0] len = '0, pos = '0;
  logic          done, match;
  int            checks = 0, failures = 0;
  int            n_true = 0;

  right_context_check #(.MAX_CHARS(MAX_CHARS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  `include "tb_context_ref.svh"

  task automatic run(input string t, input int p, input int fl, input string r, input bit fm);
    bit want;
    // past the text: leftovers that must read as a boundary
    for (int i = 0; i < MAX_CHARS; i++) text[i] = (i < t.len()) ? t[i] : pick_text();
    len = PW'(t.len()); pos = PW'(p); flen = LW'(fl);
    right = '0;
    for (int i = 0; i < r.len(); i++) right[i] = r[i];
    want = fm;
    for (int i = 0; i < r.len(); i++) begin
      int q;
      q = p + fl + i;
      if (!ref_ctx(r[i], q < t.len(), (q < t.len()) ? t[q] : 8'h00)) want = 0;
    end
    if (want) n_true++;
    @(negedge clk);
    f_done = 1; f_match = fm;
    @(negedge clk);
    f_done = 0;
    check(done && match == want,
          $sformatf("text \"%s\" pos %0d flen %0d right \"%s\" fm %b: match %b want %b", t, p, fl, r, fm, match, want));
  endtask

  initial begin
    string t, r;
    int n, p, fl;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run("but ", 0, 3, "~", 1);
    run("butter ", 0, 3, "~", 1);
    run("but", 0, 3, "~", 1);        // end of text is a boundary
    run("but,", 0, 3, "~", 1);
    run("ab1 ", 0, 2, "#~", 1);
    run("ab1 ", 0, 2, "!", 1);
    run("ab ", 0, 2, "", 1);         // empty context
    run("ab ", 0, 2, "", 0);         // focus failed
    for (int k = 0; k < 800; k++) begin
      t = "";
      n = $urandom_range(1, MAX_CHARS);
      for (int i = 0; i < n; i++) t = {t, string'(pick_text())};
      p  = $urandom_range(n - 1);
      fl = $urandom_range(1, (n - p < FIELD_LEN) ? n - p : FIELD_LEN);
      r  = "";
      for (int i = 0, int l = $urandom_range(0, 3); i < l; i++) r = {r, string'(pick_pattern())};
      run(t, p, fl, r, $urandom_range(7) != 0);
    end
    check(n_true > 100, "enough matching cases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
