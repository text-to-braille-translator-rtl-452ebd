// tb_left_context_check: random texts, positions and left contexts (stored
// nearest-first, literals and the '~', '!', '#' wildcards) against a
// reference model; a failure from the earlier checks must be passed on.
module tb_left_context_check;
  import braille_pkg::*;

  localparam int MAX_CHARS = 40;
  localparam int PW = $clog2(MAX_CHARS + 1);

  logic          clk = 0, rst_n = 0;
  logic          r_done = 0, r_match = 0;
  field_t        left = '0;
  char_t         text [MAX_CHARS];
  logic [PW-1:0] pos = '0;
  logic          done, match;
  int            checks = 0, failures = 0;
  int            n_true = 0;

  left_context_check #(.MAX_CHARS(MAX_CHARS)) dut (.*);

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

  // `l` is written as it reads in the text (farthest first), as in a rule
  // listing; the testbench stores it nearest-first.
  task automatic run(input string t, input int p, input string l, input bit rm);
    bit want;
    for (int i = 0; i < MAX_CHARS; i++) text[i] = (i < t.len()) ? t[i] : 8'h00;
    pos = PW'(p);
    left = '0;
    for (int i = 0; i < l.len(); i++) left[i] = l[l.len() - 1 - i];
    want = rm;
    for (int i = 0; i < l.len(); i++) begin
      int q;
      q = p - l.len() + i;
      if (!ref_ctx(l[i], q >= 0, (q >= 0) ? t[q] : 8'h00)) want = 0;
    end
    if (want) n_true++;
    @(negedge clk);
    r_done = 1; r_match = rm;
    @(negedge clk);
    r_done = 0;
    check(done && match == want,
          $sformatf("text \"%s\" pos %0d left \"%s\" rm %b: match %b want %b", t, p, l, rm, match, want));
  endtask

  initial begin
    string t, l;
    int n, p;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run("sing ", 1, "!", 1);
    run("ing ", 0, "!", 1);         // nothing before: not a letter
    run("ing ", 0, "~", 1);         // nothing before: a boundary
    run("a but", 2, "~", 1);
    run("12", 1, "#", 1);
    run("a2", 1, "#", 1);
    run("ab1", 2, "ab", 1);
    run("ab1", 2, "ba", 1);
    run("ab1", 2, "", 0);
    for (int k = 0; k < 800; k++) begin
      t = "";
      n = $urandom_range(1, MAX_CHARS);
      for (int i = 0; i < n; i++) t = {t, string'(pick_text())};
      p = $urandom_range(n - 1);
      l = "";
      for (int i = 0, int m = $urandom_range(0, 3); i < m; i++) l = {l, string'(pick_pattern())};
      run(t, p, l, $urandom_range(7) != 0);
    end
    check(n_true > 100, "enough matching cases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
