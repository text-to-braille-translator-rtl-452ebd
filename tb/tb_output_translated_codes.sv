// tb_output_translated_codes: writes groups of codes from both writers,
// flushes them through a receiver with random back-pressure and checks that
// exactly the written bytes come out, in order, followed by flush_done; also
// a group as long as the buffer (MAX_CHARS*FIELD_LEN) and an empty group.
module tb_output_translated_codes;
  import braille_pkg::*;

  localparam int MAX_CHARS = 40;
  localparam int DEPTH = MAX_CHARS * FIELD_LEN;

  logic  clk = 0, rst_n = 0;
  logic  code_valid = 0, fail_valid = 0, flush = 0;
  char_t code = '0, fail_char = '0;
  logic  flush_done, tx_valid, tx_ready = 0;
  char_t tx_data;
  int    checks = 0, failures = 0;

  output_translated_codes #(.MAX_CHARS(MAX_CHARS)) dut (.*);

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

  task automatic group(input int n);
    byte want [$];
    byte got [$];
    int  cyc;
    for (int i = 0; i < n; i++) begin
      byte b;
      b = 8'($urandom);
      want.push_back(b);
      @(negedge clk);
      if ($urandom_range(1)) begin code_valid = 1; code = b; end
      else begin fail_valid = 1; fail_char = b; end
      @(negedge clk);
      code_valid = 0; fail_valid = 0;
      if ($urandom_range(3) == 0) @(negedge clk);
    end
    check(!tx_valid, "nothing offered before the flush");
    @(negedge clk);
    flush = 1;
    @(negedge clk);
    flush = 0;
    cyc = 0;
    while (!flush_done && cyc < 20 * DEPTH) begin
      tx_ready = ($urandom_range(2) != 0);
      #1;
      if (tx_valid && tx_ready) got.push_back(tx_data);
      @(negedge clk);
      cyc++;
    end
    tx_ready = 0;
    check(flush_done, "flush_done");
    check(got == want, $sformatf("group of %0d codes sent in order (%0d sent)", n, got.size()));
    @(negedge clk);
    check(!flush_done && !tx_valid, "flush_done is a strobe and the buffer is empty");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    group(1);
    group(5);
    group(0);
    group(DEPTH);
    for (int k = 0; k < 20; k++) group($urandom_range(1, 60));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
