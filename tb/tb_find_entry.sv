// tb_find_entry: checks the entry-address table. With the built-in table the
// first rule of each character is known from the table's layout (space at 0,
// digits from 9, letters a..z at hand-counted addresses). Characters without
// rules must fail and be passed on. Then the table is cleared and rebuilt by
// watching rule writes. Every answer must come exactly one cycle after the
// request.
module tb_find_entry;
  import braille_pkg::*;

  localparam int RULE_DEPTH = 512;
  localparam int AW = $clog2(RULE_DEPTH);

  logic          clk = 0, rst_n = 0;
  logic          entry_valid = 0;
  char_t         entry_char = '0;
  logic          addr_ready, fail;
  logic [AW-1:0] entry_addr;
  char_t         entry_char_q, fail_char;
  logic          tbl_clear = 0, tbl_we = 0;
  logic [AW-1:0] tbl_addr = '0;
  char_t         tbl_first_char = '0;
  int            checks = 0, failures = 0;

  find_entry #(.RULE_DEPTH(RULE_DEPTH)) dut (.*);

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

  // expect_addr < 0: expect a fail.
  task automatic lookup(input char_t c, input int expect_addr);
    @(negedge clk);
    entry_valid = 1; entry_char = c;
    @(negedge clk);
    entry_valid = 0;
    if (expect_addr >= 0) begin
      check(addr_ready && !fail && entry_addr == AW'(expect_addr) && entry_char_q == c,
            $sformatf("entry of '%c' at %0d, got ready=%b addr=%0d", c, expect_addr, addr_ready, entry_addr));
    end else begin
      check(fail && !addr_ready && fail_char == c, $sformatf("'%c' (%0d) has no entry", c, c));
    end
    @(negedge clk);
    check(!addr_ready && !fail, "answers are one-cycle strobes");
  endtask

  task automatic write_rule(input int a, input char_t c);
    @(negedge clk);
    tbl_we = 1; tbl_addr = AW'(a); tbl_first_char = c;
    @(negedge clk);
    tbl_we = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Built-in table: addresses counted from its listing.
    lookup(" ", 0);   lookup(",", 1);   lookup("-", 8);
    lookup("1", 9);   lookup("2", 11);  lookup("0", 27);
    lookup("a", 29);  lookup("b", 33);  lookup("c", 35);  lookup("e", 40);
    lookup("i", 52);  lookup("k", 57);  lookup("o", 65);  lookup("s", 75);
    lookup("t", 79);  lookup("w", 87);  lookup("x", 91);  lookup("z", 94);
    lookup("@", -1);  lookup("A", -1);  lookup(8'hE9, -1); lookup(8'h00, -1);

    // Clear, then rebuild from a new sequence of rule writes.
    @(negedge clk); tbl_clear = 1; @(negedge clk); tbl_clear = 0;
    lookup("a", -1);  lookup(" ", -1);
    write_rule(0, "q"); write_rule(1, "q"); write_rule(2, "@");
    write_rule(3, "@"); write_rule(4, "a"); write_rule(5, 8'h00);
    write_rule(6, "q");   // a later rule of an earlier character: first one stays
    lookup("q", 0);  lookup("@", 2);  lookup("a", 4);  lookup("b", -1);

    // Reset restores the built-in table.
    rst_n = 0; @(negedge clk); rst_n = 1;
    lookup("t", 79);  lookup("@", -1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
