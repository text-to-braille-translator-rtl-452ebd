// tb_lookup_table: checks the rule memory. The power-up contents are held
// against rules written out by hand here (byte by byte, not through the
// package's rule builder), then random rules are written and read back, and
// the one-cycle read latency is checked.
module tb_lookup_table;
  import braille_pkg::*;

  localparam int DEPTH = 512;
  localparam int AW    = $clog2(DEPTH);

  logic          clk = 0;
  logic          rd_en = 0, wr_en = 0;
  logic [AW-1:0] rd_addr = '0, wr_addr = '0;
  rule_t         rd_rule, wr_rule = '0;
  int            checks = 0, failures = 0;
  rule_t         shadow [int];

  lookup_table #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

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

  task automatic read(input int a, output rule_t r);
    @(negedge clk);
    rd_en = 1; rd_addr = AW'(a);
    @(negedge clk);
    rd_en = 0;
    r = rd_rule;
  endtask

  // Hand-written expectations: {left nearest-first, focus, right, codes}.
  task automatic expect_rule(input int a, input logic [7:0] l0, input logic [7:0] f0,
                             input logic [7:0] f1, input logic [7:0] f2, input logic [7:0] f3,
                             input logic [7:0] r0, input logic [7:0] c0, input logic [7:0] c1);
    rule_t r;
    read(a, r);
    check(r.left[0] == l0 && r.left[1] == 8'h00, $sformatf("rule %0d left", a));
    check(r.focus[0] == f0 && r.focus[1] == f1 && r.focus[2] == f2 && r.focus[3] == f3,
          $sformatf("rule %0d focus %s", a, r.focus));
    check(r.right[0] == r0 && r.right[1] == 8'h00, $sformatf("rule %0d right", a));
    check(r.codes[0] == c0 && r.codes[1] == c1, $sformatf("rule %0d codes", a));
  endtask

  initial begin
    rule_t r;
    @(negedge clk);
    expect_rule(0,  8'h00, " ", 8'h00, 8'h00, 8'h00, 8'h00, " ", 8'h00);
    expect_rule(9,  "#",   "1", 8'h00, 8'h00, 8'h00, 8'h00, "a", 8'h00);
    expect_rule(10, 8'h00, "1", 8'h00, 8'h00, 8'h00, 8'h00, "#", "a");
    expect_rule(27, "#",   "0", 8'h00, 8'h00, 8'h00, 8'h00, "j", 8'h00);
    expect_rule(33, "~",   "b", "u",   "t",   8'h00, "~",   "b", 8'h00);
    expect_rule(52, "!",   "i", "n",   "g",   8'h00, 8'h00, "+", 8'h00);
    expect_rule(80, 8'h00, "t", "h",   "e",   8'h00, 8'h00, "!", 8'h00);
    expect_rule(66, 8'h00, "o", "u",   8'h00, 8'h00, 8'h00, "\\", 8'h00);
    expect_rule(94, 8'h00, "z", 8'h00, 8'h00, 8'h00, 8'h00, "z", 8'h00);
    read(95, r);
    check(r == '0, "rule past the built-in table is empty");
    read(57, r);
    check(r.focus[8] == "e" && r.focus[9] == 8'h00, "knowledge fills nine focus bytes");

    // Random writes, read back.
    for (int k = 0; k < 64; k++) begin
      int a;
      a = 128 + $urandom_range(DEPTH - 129);   // leave the built-in rules alone
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a);
      wr_rule = {$urandom, $urandom, $urandom, $urandom, $urandom,
                 $urandom, $urandom, $urandom, $urandom, $urandom};
      shadow[a] = wr_rule;
      @(negedge clk);
      wr_en = 0;
    end
    foreach (shadow[a]) begin
      read(a, r);
      check(r == shadow[a], $sformatf("read back rule %0d", a));
    end

    // Latency: the output changes on the first clock edge after rd_en.
    @(negedge clk);
    rd_en = 1; rd_addr = AW'(0);
    @(negedge clk);
    rd_en = 0;
    begin
      rule_t prev;
      prev = rd_rule;
      @(negedge clk);
      rd_en = 1; rd_addr = AW'(94);
      #1;
      check(rd_rule == prev, "no change before the clock edge");
      @(posedge clk); #1;
      rd_en = 0;
      check(rd_rule.focus[0] == "z", "new rule right after one edge");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
