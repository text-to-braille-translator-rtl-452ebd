// tb_braille_fpga_full: the system at its default parameters (100 MHz clock,
// 4800 baud in, 57600 baud out, 40-character groups, 512-rule table) taking
// one sentence through the serial lines, sent continuously as a PC would.
// Checks the decoded Braille ASCII against a hand-worked translation, that
// no character is lost, and that the rule matching of each group takes far
// less than one input character time (208,330 clocks), so that the serial
// lines, not the translator, set the throughput.
module tb_braille_fpga_full;
  import braille_pkg::*;

  localparam int RX_BIT = 20833;   // 100e6/4800
  localparam int TX_BIT = 1736;    // 100e6/57600

  logic clk = 0, rst_n = 0;
  logic uart_rxd = 1, uart_txd;
  logic load_mode = 0;
  logic busy, overrun, frame_error;
  int   checks = 0, failures = 0;
  int   work_cycles = 0, max_work = 0, groups = 0;

  braille_fpga_top dut (.*);

  always #5 clk = ~clk;

  // Cycles from the start of a group's translation to its flush.
  always @(posedge clk) if (rst_n) begin
    if (dut.u_translator.u_block.u_ctrl.state inside {dut.u_translator.u_block.u_ctrl.ISSUE,
                                                      dut.u_translator.u_block.u_ctrl.WAIT})
      work_cycles++;
    if (dut.u_translator.u_block.flush) begin
      groups++;
      if (work_cycles > max_work) max_work = work_cycles;
      work_cycles = 0;
    end
  end

  initial begin
    repeat (15_000_000) @(posedge clk);
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

  `include "tb_serial.svh"

  initial begin
    string s, want;
    int quiet;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    s    = "The children and you sing with knowledge. ";
    want = "! *ildren & y s+ ) k4 ";
    foreach (s[i]) serial_send(s[i]);
    quiet = 0;
    while (quiet < 12 * TX_BIT) begin
      @(negedge clk);
      quiet = busy ? 0 : quiet + 1;
    end
    check(line_out == want, $sformatf("\"%s\" -> \"%s\", want \"%s\"", s, line_out, want));
    check(!overrun && !frame_error && n_serial_errors == 0, "nothing lost");
    check(groups == 7, $sformatf("%0d groups translated, want 7", groups));
    check(max_work < RX_BIT, $sformatf("longest rule matching %0d clocks", max_work));
    $display("COUNT groups=%0d longest_matching=%0d clocks", groups, max_work);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
