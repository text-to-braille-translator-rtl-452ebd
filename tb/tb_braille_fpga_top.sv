// tb_braille_fpga_top: the whole system end to end through its two serial
// lines, with the clock scaled down to 2 MHz (baud rates as in the design,
// 4800 in and 57600 out) to keep the run short. Text is sent as a PC would
// send it, continuously; the Braille ASCII coming back on the output line is
// decoded and compared with hand-worked strings and with the reference
// translator. Then a rule table is loaded over the serial line with
// load_mode set, used, and a byte is lost on purpose (overrun) and a bad
// stop bit sent (frame error). Each mechanism of the design is counted and
// must happen at least once.
module tb_braille_fpga_top;
  import braille_pkg::*;

  localparam int CLK_HZ  = 2_000_000;
  localparam int RX_BAUD = 4800;
  localparam int TX_BAUD = 57600;
  localparam int RX_BIT  = 417;    // 2e6/4800
  localparam int TX_BIT  = 35;     // 2e6/57600

  logic clk = 0, rst_n = 0;
  logic uart_rxd = 1, uart_txd;
  logic load_mode = 0;
  logic busy, overrun, frame_error;
  int   checks = 0, failures = 0;
  int   n_nofind = 0, n_rule_fail = 0, n_fired = 0, n_exhausted = 0, n_full = 0,
        n_loaded = 0, n_overrun = 0, n_ferr = 0, n_held = 0, n_groups = 0;

  braille_fpga_top #(.CLK_HZ(CLK_HZ), .RX_BAUD(RX_BAUD), .TX_BAUD(TX_BAUD)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_translator.u_block.fe_fail) n_nofind++;
    if (dut.u_translator.u_block.rule_fail) n_rule_fail++;
    if (dut.u_translator.u_block.rule_fired) n_fired++;
    if (dut.u_translator.u_block.exhausted) n_exhausted++;
    if (dut.u_translator.u_block.flush) n_groups++;
    if (dut.u_translator.u_block.ch_valid && dut.u_translator.u_block.ch_ready
        && int'(dut.u_translator.u_block.len) == 39 && dut.u_translator.u_block.ch_data != " ") n_full++;
    if (dut.u_translator.u_data.rx_valid && dut.u_translator.ch_valid && !dut.u_translator.ch_ready
        && !dut.u_translator.u_data.loading) n_overrun++;
    if (dut.u_translator.u_data.rx_valid && !dut.u_translator.ch_valid && dut.u_translator.busy
        && !dut.u_translator.u_data.loading) n_held++;
    if (dut.u_translator.tbl_we) n_loaded++;
    if (frame_error) n_ferr++;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
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
  `include "tb_serial.svh"

  // Wait until the translator has been idle for longer than a frame takes
  // to leave, so that the last code is off the line.
  task automatic wait_quiet();
    int quiet = 0;
    while (quiet < 12 * TX_BIT) begin
      @(negedge clk);
      quiet = busy ? 0 : quiet + 1;
    end
  endtask

  // Send text continuously, then wait until the last translation has left.
  task automatic text(input string s, input string want);
    line_out = "";
    foreach (s[i]) serial_send(s[i]);
    wait_quiet();
    check(line_out == want, $sformatf("\"%s\" -> \"%s\", want \"%s\"", s, line_out, want));
  endtask

  initial begin
    string s, want;
    rule_t rl;
    for (int i = 0; i < N_DEFAULT_RULES; i++) ref_add(default_rule(i));
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);

    text("The child and you sing with knowledge. ", "! *ild & y s+ ) k4 ");
    text("Out of 12 rather bright people, 3 just came. ",
         "\\t ( #ab r bri<t p1 #c j came4 ");
    s = "abcdefghijklmnopqrstuvwxyzabcdefghijklmn";     // 40 characters, no space
    text({s, " "}, {ref_translate(s), " "});
    s = ""; want = "";
    for (int k = 0; k < 8; k++) begin
      string w;
      w = {ref_random_word(), " "};
      s = {s, w}; want = {want, ref_translate(w)};
    end
    text(s, want);
    check(!overrun, "no overrun for continuous text");
    check(n_serial_errors == 0, "output frames well formed");

    // Load a table of two rules over the serial line: "ab" -> "X" and a
    // rule for 'q' that only fires before a boundary.
    @(negedge clk); load_mode = 1; repeat (10) @(negedge clk);
    rl = '0; rl.focus[0] = "a"; rl.focus[1] = "b"; rl.codes[0] = "X";
    for (int b = 0; b < RULE_BYTES; b++) serial_send(rl[8*b +: 8]);
    rl = '0; rl.focus[0] = "q"; rl.right[0] = "~"; rl.codes[0] = "Q"; rl.codes[1] = "!";
    for (int b = 0; b < RULE_BYTES; b++) serial_send(rl[8*b +: 8]);
    @(negedge clk); load_mode = 0; repeat (10) @(negedge clk);
    text("abqq ", "XqQ! ");
    text("aq ", "aQ! ");

    // A bad stop bit.
    @(negedge clk); uart_rxd = 0; repeat (9 * RX_BIT) @(negedge clk);
    uart_rxd = 0; repeat (RX_BIT) @(negedge clk); uart_rxd = 1; repeat (2 * RX_BIT) @(negedge clk);
    check(n_ferr == 1, "frame error reported");

    // Continuous text keeps up while a word's codes leave within two input
    // character times: 22 letters and a space give 23 codes, followed at
    // once by the next word.
    rst_n = 0; @(negedge clk); rst_n = 1; repeat (10) @(negedge clk);
    s = "bcdfjklmnpqvxzbcdfjklm xy ";
    text(s, s);
    check(!overrun, "a word of 23 codes does not lose the next word");

    // Overrun: a long word's codes take longer to leave than two input
    // characters take to arrive.
    rst_n = 0; @(negedge clk); rst_n = 1; repeat (10) @(negedge clk);
    s = "abcdefghijklmnopqrstuvwxyz0123456789 xyz ";
    foreach (s[i]) serial_send(s[i]);
    wait_quiet();
    check(overrun, "overrun flagged when text comes too fast");

    $display("COUNT no_entry=%0d rule_rejected=%0d fired=%0d exhausted=%0d full_group=%0d held=%0d rules_loaded=%0d overrun=%0d frame_error=%0d groups=%0d",
             n_nofind, n_rule_fail, n_fired, n_exhausted, n_full, n_held, n_loaded, n_overrun, n_ferr, n_groups);
    check(n_nofind > 0 && n_rule_fail > 0 && n_fired > 0 && n_exhausted > 0 && n_full > 0
          && n_held > 0 && n_loaded == 2 && n_overrun > 0 && n_ferr > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
