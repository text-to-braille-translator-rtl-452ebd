// lookup_table: the rule memory of the translator.
//
// Holds DEPTH rules of fixed length (braille_pkg::rule_t: left context,
// focus, right context and output codes, FIELD_LEN bytes each, every part
// ended by an ASCII 0). One whole rule is read per access, so the output-rule
// block gets a complete rule in one cycle; on an FPGA this maps to block RAM
// used at full rule width. The memory powers up holding the built-in rule
// table of braille_pkg and can be rewritten rule by rule through the write
// port (the data controller uses it to load another table).
//
// Timing: synchronous read. rd_rule shows mem[rd_addr] on the clock edge
// after rd_en is high, and holds until the next read. A write and a read of
// the same address in one cycle return the old rule.
//
// The fixed rule length with 0 end-signs follows the design description. The
// depth of 512 rules and the full-width single-cycle read are this design's
// choices.
module lookup_table
  import braille_pkg::*;
#(
  parameter  int DEPTH = 512,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output rule_t         rd_rule,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  rule_t         wr_rule
);

  rule_t mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = default_rule(i);
    rd_rule = '0;
  end

  always @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_rule;
    if (rd_en) rd_rule <= mem[rd_addr];
  end

endmodule
