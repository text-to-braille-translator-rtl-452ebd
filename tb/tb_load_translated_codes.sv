// tb_load_translated_codes: presents rules with random output codes and
// random verdicts. A fired rule must write its codes in order, one per clock,
// then report the focus length (consumed) and rule_fired; a failed rule must
// give rule_fail one cycle after the verdict and write nothing; an exhausted
// search must write the character itself and report one character.
module tb_load_translated_codes;
  import braille_pkg::*;

  localparam int LW = $clog2(FIELD_LEN + 1);

  logic          clk = 0, rst_n = 0;
  logic          rule_valid = 0;
  field_t        rule_codes = '0;
  logic          exhausted = 0;
  char_t         exhausted_char = '0;
  logic          l_done = 0, l_match = 0;
  logic [LW-1:0] flen = '0;
  logic          code_valid;
  char_t         code;
  logic          consumed;
  logic [LW-1:0] consumed_count;
  logic          rule_fired, rule_fail;
  int            checks = 0, failures = 0;

  load_translated_codes dut (.*);

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

  task automatic one_rule(input int ncodes, input int fl, input bit fire);
    byte want [$];
    byte got [$];
    int  cyc;
    field_t c;
    c = '0;
    for (int i = 0; i < ncodes; i++) begin
      c[i] = 8'($urandom_range(33, 126));
      want.push_back(c[i]);
    end
    @(negedge clk);
    rule_valid = 1; rule_codes = c;
    @(negedge clk);
    rule_valid = 0; rule_codes = '1;      // must have been copied
    repeat (3) @(negedge clk);            // the checks take their time
    l_done = 1; l_match = fire; flen = LW'(fl);
    @(negedge clk);
    l_done = 0; flen = '0;
    if (!fire) begin
      check(rule_fail && !code_valid && !consumed && !rule_fired, "rule_fail one cycle after the verdict");
      @(negedge clk);
      check(!rule_fail, "rule_fail is a strobe");
      return;
    end
    cyc = 0;
    while (!consumed && cyc < 20) begin
      check(!rule_fail, "no rule_fail for a fired rule");
      if (code_valid) got.push_back(code);
      @(negedge clk);
      cyc++;
    end
    check(consumed && rule_fired && int'(consumed_count) == fl, $sformatf("consumed %0d", fl));
    check(got == want, $sformatf("codes of a fired rule (%0d of %0d)", got.size(), want.size()));
    check(cyc == ncodes + 1, $sformatf("%0d codes took %0d cycles", ncodes, cyc));
    @(negedge clk);
    check(!consumed && !rule_fired && !code_valid, "feedback is a strobe");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    one_rule(1, 1, 1);
    one_rule(2, 1, 1);
    one_rule(1, 9, 1);
    one_rule(FIELD_LEN, 2, 1);
    one_rule(0, 3, 1);
    one_rule(3, 3, 0);
    for (int k = 0; k < 200; k++)
      one_rule($urandom_range(0, FIELD_LEN), $urandom_range(1, FIELD_LEN), $urandom_range(1));
    // exhausted search
    for (int k = 0; k < 10; k++) begin
      char_t ch;
      ch = 8'($urandom_range(33, 126));
      @(negedge clk);
      exhausted = 1; exhausted_char = ch;
      @(negedge clk);
      exhausted = 0;
      check(code_valid && code == ch && !consumed, "exhausted: character written");
      @(negedge clk);
      check(consumed && consumed_count == LW'(1) && !rule_fired && !code_valid, "exhausted: one character consumed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
