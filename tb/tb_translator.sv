// tb_translator: the translator from received bytes to Braille ASCII codes.
// Checks capital folding, whole sentences word by word, a 40-character group
// without a space, loading a new rule table over the byte input (rules
// assembled from 40 bytes each) and translating with it, including a
// character whose rules run out and one past the last loaded rule, and the
// overrun flag for a byte sent while the translator is busy. Expected output
// comes from hand-worked strings and the string-based reference translator.
// Each mechanism is counted and must happen at least once.
module tb_translator;
  import braille_pkg::*;

  localparam int MAX_CHARS  = 40;
  localparam int RULE_DEPTH = 512;

  logic  clk = 0, rst_n = 0;
  logic  rx_valid = 0, load_mode = 0;
  char_t rx_data = '0;
  logic  tx_valid, tx_ready = 0, busy, overrun;
  char_t tx_data;
  int    checks = 0, failures = 0;
  string received = "";
  int    n_nofind = 0, n_rule_fail = 0, n_fired = 0, n_exhausted = 0, n_full = 0,
         n_loaded = 0, n_overrun = 0;

  translator #(.MAX_CHARS(MAX_CHARS), .RULE_DEPTH(RULE_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    tx_ready <= ($urandom_range(3) != 0);
    if (tx_valid && tx_ready) received = {received, string'(tx_data)};
    if (dut.u_block.fe_fail) n_nofind++;
    if (dut.u_block.rule_fail) n_rule_fail++;
    if (dut.u_block.rule_fired) n_fired++;
    if (dut.u_block.exhausted) n_exhausted++;
    if (dut.u_block.u_ctrl.state == dut.u_block.u_ctrl.COLLECT && dut.u_block.ch_valid
        && int'(dut.u_block.len) == MAX_CHARS - 1 && dut.u_block.ch_data != " ") n_full++;
    if (dut.tbl_we) n_loaded++;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
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

  `include "tb_braille_ref.svh"

  task automatic send_byte(input char_t b);
    @(negedge clk);
    rx_valid = 1; rx_data = b;
    @(negedge clk);
    rx_valid = 0;
    repeat (3) @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  task automatic text(input string s, input string want);
    received = "";
    foreach (s[i]) send_byte(s[i]);
    check(received == want, $sformatf("\"%s\" -> \"%s\", want \"%s\"", s, received, want));
  endtask

  function automatic rule_t r(string l, string f, string rt, string c);
    rule_t x = '0;
    for (int i = 0; i < l.len(); i++)  x.left[i]  = l[l.len() - 1 - i];
    for (int i = 0; i < f.len(); i++)  x.focus[i] = f[i];
    for (int i = 0; i < rt.len(); i++) x.right[i] = rt[i];
    for (int i = 0; i < c.len(); i++)  x.codes[i] = c[i];
    return x;
  endfunction

  initial begin
    rule_t table2 [5];
    string s;
    for (int i = 0; i < N_DEFAULT_RULES; i++) ref_add(default_rule(i));
    repeat (3) @(negedge clk);
    rst_n = 1;

    text("The ", "! ");
    text("THE CHILD ", "! *ild ");
    text("you and i sing with knowledge ", "y & i s+ ) k ");
    text("it is 2019. ", "x is #bjai4 ");
    // 40 characters with no space: translated as one group, then the space
    s = "thethethethethethethethethethethethethet";
    text({s, " "}, {ref_translate(s), " "});
    for (int k = 0; k < 40; k++) begin
      string w;
      w = {ref_random_word(), " "};
      text(w, ref_translate(w));
    end
    check(!overrun, "no overrun when paced");

    // Load a small table of five rules.
    table2[0] = r("",  "ab", "",  "X");
    table2[1] = r("",  "b",  "~", "Y");
    table2[2] = r("~", "c",  "",  "Z");
    table2[3] = r("",  "c",  "",  "z");
    table2[4] = r("",  "d",  "~", "D");
    @(negedge clk); load_mode = 1; repeat (5) @(negedge clk);
    foreach (table2[k])
      for (int b = 0; b < RULE_BYTES; b++) send_byte(table2[k][8*b +: 8]);
    @(negedge clk); load_mode = 0; repeat (5) @(negedge clk);
    check(dut.n_rules == 5, "five rules loaded");
    text("ab ", "X ");
    text("ac ", "az ");      // 'a' runs out of rules
    text("bb ", "bY ");
    text("cde ", "Zde ");    // d is not at a word end; e and space have no rules
    text("dd ", "dD ");      // the second rule for 'd' would lie past the table

    // Overrun: bytes arriving while a group is in work.
    received = "";
    @(negedge clk); rx_valid = 1; rx_data = "d"; @(negedge clk); rx_valid = 0;
    @(negedge clk); rx_valid = 1; rx_data = " "; @(negedge clk); rx_valid = 0;
    @(negedge clk); rx_valid = 1; rx_data = "c"; @(negedge clk); rx_valid = 0;
    @(negedge clk); rx_valid = 1; rx_data = "c"; @(negedge clk); rx_valid = 0;
    @(negedge clk);
    check(overrun, "overrun flagged");
    if (overrun) n_overrun++;

    // Reset brings back the built-in table.
    rst_n = 0; @(negedge clk); rst_n = 1; repeat (3) @(negedge clk);
    text("the ", "! ");

    $display("COUNT no_entry=%0d rule_rejected=%0d fired=%0d exhausted=%0d full_group=%0d rules_loaded=%0d overrun=%0d",
             n_nofind, n_rule_fail, n_fired, n_exhausted, n_full, n_loaded, n_overrun);
    check(n_nofind > 0 && n_rule_fail > 0 && n_fired > 0 && n_exhausted > 0 && n_full > 0
          && n_loaded == 5 && n_overrun > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
