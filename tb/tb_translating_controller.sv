// tb_translating_controller: feeds words and plays the rest of the
// translating block. For each entry request the testbench decides at random
// whether find-entry fails (advance by one) or a rule consumes 1..3
// characters, and checks that the controller asks for exactly the
// characters that are left, at the right positions, then flushes once and
// takes the next group. Also checks the 40-character limit, the stored text
// and that no character is accepted while a group is in work.
module tb_translating_controller;
  import braille_pkg::*;

  localparam int MAX_CHARS = 40;
  localparam int PW = $clog2(MAX_CHARS + 1);
  localparam int LW = $clog2(FIELD_LEN + 1);

  logic          clk = 0, rst_n = 0;
  logic          ch_valid = 0;
  char_t         ch_data = '0;
  logic          ch_ready;
  char_t         text [MAX_CHARS];
  logic [PW-1:0] len, pos;
  logic          entry_valid;
  char_t         entry_char;
  logic          fail = 0, consumed = 0;
  logic [LW-1:0] consumed_count = '0;
  logic          flush, flush_done = 0, busy;
  int            checks = 0, failures = 0;

  translating_controller #(.MAX_CHARS(MAX_CHARS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // Send a group; `expect_len` characters must be taken before work starts.
  task automatic group(input string s, input int expect_len);
    int p, cyc;
    foreach (s[i]) begin
      @(negedge clk);
      check(ch_ready, "ready while collecting");
      ch_valid = 1; ch_data = s[i];
      @(negedge clk);
      ch_valid = 0;
    end
    check(busy && !ch_ready && int'(len) == expect_len, $sformatf("group of %0d taken", expect_len));
    for (int i = 0; i < expect_len; i++)
      check(text[i] == s[i], "stored text");
    p = 0;
    while (p < expect_len) begin
      int step;
      cyc = 0;
      while (!entry_valid && !flush && cyc < 10) begin @(negedge clk); cyc++; end
      check(entry_valid && entry_char == s[p] && int'(pos) == p,
            $sformatf("entry request at %0d ('%c'), got pos %0d '%c'", p, s[p], pos, entry_char));
      check(!ch_ready, "not ready while translating");
      @(negedge clk);
      step = $urandom_range(1, 3);
      if (p + step > expect_len) step = expect_len - p;
      repeat ($urandom_range(0, 6)) begin             // feedback may come later
        check(!entry_valid, "one request per position");
        @(negedge clk);
      end
      if (step == 1 && $urandom_range(1)) begin
        fail = 1;
      end else begin
        consumed = 1; consumed_count = LW'(step);
      end
      @(negedge clk);
      fail = 0; consumed = 0;
      p += step;
    end
    cyc = 0;
    while (!flush && cyc < 10) begin @(negedge clk); cyc++; end
    check(flush, "flush after the last position");
    repeat (5) begin
      @(negedge clk);
      check(!entry_valid && busy && !ch_ready, "waiting for the codes to leave");
    end
    flush_done = 1;
    @(negedge clk);
    flush_done = 0;
    check(ch_ready && !busy && len == '0, "collecting again");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    group("the ", 4);
    group("a\n", 2);
    group("x\r", 2);
    group("knowledge ", 10);
    // 40 characters without a delimiter: the group starts when full
    group("abcdefghijklmnopqrstuvwxyzabcdefghijklmn", MAX_CHARS);
    for (int k = 0; k < 30; k++) begin
      string w;
      int n;
      w = "";
      n = $urandom_range(1, 12);
      for (int i = 0; i < n; i++) w = {w, string'(8'($urandom_range(97, 122)))};
      group({w, " "}, n + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
