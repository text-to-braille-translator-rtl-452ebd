// tb_focus_check: random texts and random foci over a small alphabet (so
// that matches are frequent), compared with a string-based reference model.
// Also checks the one-cycle latency, the hold of the verdict, and that an
// empty focus or one running past the end of the text never matches.
module tb_focus_check;
  import braille_pkg::*;

  localparam int MAX_CHARS = 40;
  localparam int PW = $clog2(MAX_CHARS + 1);
  localparam int LW = $clog2(FIELD_LEN + 1);

  logic          clk = 0, rst_n = 0;
  logic          rule_valid = 0;
  field_t        focus = '0;
  char_t         text [MAX_CHARS];
  logic [PW-1:0] len = '0, pos = '0;
  logic          done, match;
  logic [LW-1:0] flen;
  int            checks = 0, failures = 0;

  focus_check #(.MAX_CHARS(MAX_CHARS)) dut (.*);

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

  function automatic byte pick();
    string alphabet = "ab 1";
    return alphabet[$urandom_range(alphabet.len() - 1)];
  endfunction

  task automatic run(input string t, input int p, input string f);
    bit want;
    // past the text: leftovers that must not be looked at
    for (int i = 0; i < MAX_CHARS; i++) text[i] = (i < t.len()) ? t[i] : pick();
    len = PW'(t.len());
    pos = PW'(p);
    focus = '0;
    for (int i = 0; i < f.len(); i++) focus[i] = f[i];
    want = (f.len() > 0) && (p + f.len() <= t.len()) && (t.substr(p, p + f.len() - 1) == f);
    @(negedge clk);
    rule_valid = 1;
    @(negedge clk);
    rule_valid = 0;
    check(done, "done one cycle after rule_valid");
    check(match == want, $sformatf("text \"%s\" pos %0d focus \"%s\": match %b want %b", t, p, f, match, want));
    if (want) check(int'(flen) == f.len(), "focus length");
    focus = ~focus;   // verdict must hold while inputs change
    @(negedge clk);
    check(!done && match == want, "done is a strobe and match holds");
  endtask

  initial begin
    string t, f;
    int n, p;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run("the cat ", 0, "the");
    run("the cat ", 0, "th");
    run("the cat ", 4, "cat");
    run("the cat ", 4, "cab");
    run("the cat ", 6, "t ");
    run("the cat ", 7, " x");       // runs past the text
    run("the cat ", 0, "");         // empty focus
    run("knowledge ", 0, "knowledge");
    for (int k = 0; k < 600; k++) begin
      t = "";
      n = $urandom_range(1, MAX_CHARS);
      for (int i = 0; i < n; i++) t = {t, string'(pick())};
      p = $urandom_range(n - 1);
      f = "";
      if ($urandom_range(1)) begin
        // a copy of the text at pos, possibly cut or changed
        int l;
        l = $urandom_range(1, FIELD_LEN);
        for (int i = 0; i < l; i++) f = {f, string'((p + i < n) ? t[p + i] : pick())};
        if ($urandom_range(3) == 0) f[$urandom_range(l - 1)] = pick();
      end else begin
        int l;
        l = $urandom_range(1, 4);
        for (int i = 0; i < l; i++) f = {f, string'(pick())};
      end
      run(t, p, f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
