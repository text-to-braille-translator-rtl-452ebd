// tb_data_controller: text mode (bytes handed on with capitals folded to
// lower case, hold and back-pressure, the overrun flag when a byte arrives
// while the previous one still waits) and load mode (the table cleared when
// load_mode rises, 40 bytes assembled into one rule in the documented byte
// order and written at consecutive addresses, n_rules counting them).
module tb_data_controller;
  import braille_pkg::*;

  localparam int RULE_DEPTH = 512;
  localparam int AW = $clog2(RULE_DEPTH);

  logic          clk = 0, rst_n = 0;
  logic          rx_valid = 0;
  char_t         rx_data = '0;
  logic          load_mode = 0;
  logic          ch_valid, ch_ready = 1;
  char_t         ch_data;
  logic          overrun;
  logic          tbl_clear, tbl_we;
  logic [AW-1:0] tbl_addr;
  rule_t         tbl_rule;
  logic [AW:0]   n_rules;
  int            checks = 0, failures = 0;
  int            clears = 0;

  data_controller #(.RULE_DEPTH(RULE_DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && tbl_clear) clears++;

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

  task automatic send(input char_t b);
    @(negedge clk);
    rx_valid = 1; rx_data = b;
    @(negedge clk);
    rx_valid = 0;
  endtask

  initial begin
    rule_t want;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(n_rules == (AW+1)'(N_DEFAULT_RULES), "built-in table size after reset");

    // Text mode with the translator ready.
    for (int c = 32; c < 127; c++) begin
      char_t lower;
      lower = (c >= 65 && c <= 90) ? char_t'(c + 32) : char_t'(c);
      send(char_t'(c));
      check(ch_valid && ch_data == lower, $sformatf("byte %0d handed on as %0d", c, ch_data));
      @(negedge clk);
      check(!ch_valid, "taken by the controller");
    end
    check(!overrun, "no overrun while ready");

    // Translator busy: the byte waits; a second byte is an overrun.
    ch_ready = 0;
    send("Q");
    repeat (5) @(negedge clk);
    check(ch_valid && ch_data == "q" && !overrun, "byte held while busy");
    send("r");
    @(negedge clk);
    check(overrun && ch_data == "q", "second byte while busy is an overrun");
    ch_ready = 1;
    @(negedge clk);
    check(!ch_valid && overrun, "held byte taken, overrun sticky");

    // Load mode: two rules.
    load_mode = 1;
    repeat (5) @(negedge clk);
    check(clears == 1 && n_rules == '0, "table cleared on entering load mode");
    for (int r = 0; r < 2; r++) begin
      want = '0;
      for (int b = 0; b < RULE_BYTES; b++) begin
        char_t v;
        v = 8'($urandom);
        want[8*b +: 8] = v;                     // first byte least significant
        send(v);
        if (b < RULE_BYTES - 1) check(!tbl_we, "no write before the rule is complete");
        else check(tbl_we && tbl_addr == AW'(r) && tbl_rule == want,
                   $sformatf("rule %0d written", r));
        check(!ch_valid, "no text while loading");
      end
      @(negedge clk);
      check(!tbl_we && n_rules == (AW+1)'(r + 1), "write strobe and rule count");
    end
    // A hand-made rule in field terms: codes "x", focus "ab".
    want = '0;
    want.codes[0] = "x"; want.focus[0] = "a"; want.focus[1] = "b";
    for (int b = 0; b < RULE_BYTES; b++) send(want[8*b +: 8]);
    check(tbl_we && tbl_addr == AW'(2) && tbl_rule.focus[0] == "a" && tbl_rule.focus[1] == "b"
          && tbl_rule.codes[0] == "x", "field order of a loaded rule");
    load_mode = 0;
    repeat (5) @(negedge clk);
    check(n_rules == (AW+1)'(3) && clears == 1, "rule count kept after loading");
    send("A");
    check(ch_valid && ch_data == "a", "text mode again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
