// tb_translating_block: the eight translating blocks together with the rule
// memory holding the built-in table. Words are fed in as the data controller
// would, and the Braille ASCII that comes out is compared with hand-worked
// translations and with the string-based reference translator for random
// words. The testbench counts how often each path of the block is taken
// (no entry for a character, a rule rejected by each of the three checks,
// a rule fired) and fails if one never happens. It also checks that each
// rule after a rejected one is presented 5 clocks after its predecessor.
module tb_translating_block;
  import braille_pkg::*;

  localparam int MAX_CHARS  = 40;
  localparam int RULE_DEPTH = 512;
  localparam int AW = $clog2(RULE_DEPTH);

  logic          clk = 0, rst_n = 0;
  logic          ch_valid = 0, ch_ready;
  char_t         ch_data = '0;
  logic          rd_en;
  logic [AW-1:0] rd_addr;
  rule_t         rd_rule;
  logic [AW:0]   n_rules = (AW+1)'(N_DEFAULT_RULES);
  logic          tbl_clear = 0, tbl_we = 0;
  logic [AW-1:0] tbl_addr = '0;
  char_t         tbl_first_char = '0;
  logic          tx_valid, tx_ready = 0, busy;
  char_t         tx_data;
  int            checks = 0, failures = 0;
  string         received = "";
  longint        cycle = 0, last_valid = 0;
  bit            last_was_fail = 0;
  int            n_nofind = 0, n_focus_rej = 0, n_right_rej = 0, n_left_rej = 0, n_fired = 0;

  translating_block #(.MAX_CHARS(MAX_CHARS), .RULE_DEPTH(RULE_DEPTH)) dut (.*);

  lookup_table #(.DEPTH(RULE_DEPTH)) u_mem (
    .clk, .rd_en, .rd_addr, .rd_rule,
    .wr_en(1'b0), .wr_addr('0), .wr_rule('0)
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    tx_ready <= ($urandom_range(3) != 0);
    if (tx_valid && tx_ready) received = {received, string'(tx_data)};
    if (dut.fe_fail) n_nofind++;
    if (dut.f_done && !dut.f_match) n_focus_rej++;
    if (dut.r_done && dut.f_match && !dut.r_match) n_right_rej++;
    if (dut.l_done && dut.r_match && !dut.l_match) n_left_rej++;
    if (dut.rule_fired) n_fired++;
    // A rejected rule is replaced 5 clocks after the one before it.
    if (dut.rule_valid) begin
      if (last_was_fail) begin
        checks++;
        if (cycle - last_valid != 5) begin
          failures++;
          $display("FAIL: next rule %0d clocks after the previous one, want 5", cycle - last_valid);
        end
      end
      last_valid    = cycle;
      last_was_fail = 0;
    end
    if (dut.rule_fail) last_was_fail = 1;
    if (dut.rule_fired || dut.exhausted) last_was_fail = 0;
    cycle++;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
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

  task automatic word(input string w, input string want);
    int cyc;
    received = "";
    foreach (w[i]) begin
      @(negedge clk);
      while (!ch_ready) @(negedge clk);
      ch_valid = 1; ch_data = w[i];
      @(negedge clk);
      ch_valid = 0;
    end
    @(negedge clk);
    cyc = 0;
    while (busy && cyc < 100000) begin @(negedge clk); cyc++; end
    check(received == want, $sformatf("\"%s\" -> \"%s\", want \"%s\"", w, received, want));
  endtask

  initial begin
    for (int i = 0; i < N_DEFAULT_RULES; i++) ref_add(default_rule(i));
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Worked by hand from the rule table.
    word("the ", "! ");
    word("knowledge ", "k ");
    word("knowledges ", "kn[l$ges ");
    word("and ", "& ");
    word("12 ", "#ab ");
    word("children ", "*ildren ");
    word("singing ", "s++ ");
    word("ing ", "ing ");
    word("youth ", "y\\? ");
    word("x@ ", "x@ ");
    word("bread, ", "bread1 ");
    word("but, ", "b1 ");
    word("withstand ", ")/& ");
    // Random words against the reference translator.
    for (int k = 0; k < 150; k++) begin
      string w;
      w = {ref_random_word(), " "};
      word(w, ref_translate(w));
    end
    $display("COUNT no_entry=%0d focus_rejected=%0d right_rejected=%0d left_rejected=%0d fired=%0d",
             n_nofind, n_focus_rej, n_right_rej, n_left_rej, n_fired);
    check(n_nofind > 0 && n_focus_rej > 0 && n_right_rej > 0 && n_left_rej > 0 && n_fired > 0,
          "every path of the block was taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
