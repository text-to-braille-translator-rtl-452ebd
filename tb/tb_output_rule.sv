// tb_output_rule: checks the rule sequencer against a rule memory modelled
// here. The memory holds a few hand-made rule groups. The testbench plays
// find-entry (addr_ready) and load-translated-codes (rule_fail / rule_fired)
// and checks which rules are presented, in what order, with what latency
// (the first 3 clocks after addr_ready, each further one on the clock after
// rule_fail, thanks to the prefetch),
// and that the search ends with `exhausted` at the end of a group or of the
// loaded table.
module tb_output_rule;
  import braille_pkg::*;

  localparam int RULE_DEPTH = 16;
  localparam int AW = $clog2(RULE_DEPTH);

  logic          clk = 0, rst_n = 0;
  logic          addr_ready = 0;
  logic [AW-1:0] entry_addr = '0;
  char_t         entry_char = '0;
  logic [AW:0]   n_rules = (AW+1)'(8);
  logic          rd_en;
  logic [AW-1:0] rd_addr;
  rule_t         rd_rule;
  rule_t         rule;
  logic          rule_valid, exhausted;
  char_t         exhausted_char;
  logic          rule_fired = 0, rule_fail = 0;
  int            checks = 0, failures = 0;

  rule_t mem [RULE_DEPTH];

  output_rule #(.RULE_DEPTH(RULE_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  // Synchronous memory model: first focus byte = group, codes[0] = address.
  always @(posedge clk) if (rd_en) rd_rule <= mem[rd_addr];

  initial begin
    repeat (20000) @(posedge clk);
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

  // Start a search at `a` for `c`; reject `nfail` rules, then fire one (or,
  // if fire_after < 0, keep rejecting). Returns the addresses presented.
  task automatic search(input int a, input char_t c, input int nfail, input bit fire,
                        input int expect_n, input bit expect_exhaust);
    int presented, cyc;
    presented = 0;
    @(negedge clk);
    addr_ready = 1; entry_addr = AW'(a); entry_char = c;
    @(negedge clk);
    addr_ready = 0;
    forever begin
      cyc = 0;
      while (!rule_valid && !exhausted) begin
        @(negedge clk);
        cyc++;
        if (cyc > 10) break;
      end
      if (exhausted) begin
        check(expect_exhaust && exhausted_char == c, $sformatf("exhausted for '%c'", c));
        break;
      end
      check(cyc == ((presented == 0) ? 2 : 0),
            $sformatf("rule %0d presented %0d cycles after the request or rejection", presented, cyc));
      check(rule.focus[0] == c && rule.codes[0] == 8'(a + presented),
            $sformatf("rule %0d presented in order", a + presented));
      presented++;
      @(negedge clk);
      if (presented <= nfail) begin
        rule_fail = 1; @(negedge clk); rule_fail = 0;
      end else if (fire) begin
        rule_fired = 1; @(negedge clk); rule_fired = 0;
        repeat (4) begin
          check(!rule_valid && !exhausted, "nothing after the rule fired");
          @(negedge clk);
        end
        break;
      end
    end
    check(presented == expect_n, $sformatf("%0d rules presented, want %0d", presented, expect_n));
  endtask

  initial begin
    for (int i = 0; i < RULE_DEPTH; i++) mem[i] = '0;
    // groups: 'a' at 0..2, 'b' at 3..4, 'c' at 5..7, then 'c' again at 8
    // (beyond n_rules = 8, so never reached)
    for (int i = 0; i < 9; i++) begin
      mem[i].focus[0] = (i < 3) ? "a" : (i < 5) ? "b" : "c";
      mem[i].codes[0] = 8'(i);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    search(0, "a", 0, 1, 1, 0);   // first rule fires
    search(0, "a", 2, 1, 3, 0);   // third rule fires
    search(0, "a", 3, 0, 3, 1);   // all fail: next rule is 'b', end of group
    search(3, "b", 1, 1, 2, 0);
    search(5, "c", 3, 0, 3, 1);   // end of loaded rules (n_rules)
    n_rules = (AW+1)'(9);
    search(5, "c", 3, 1, 4, 0);   // now rule 8 is reachable
    n_rules = (AW+1)'(0);
    search(0, "a", 0, 0, 0, 1);   // empty table
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
