// data_controller: the translator's input side. It takes the bytes that the
// serial receiver delivers and either hands them to the translating
// controller as text or, while load_mode is set, assembles them into rules
// and writes them into the look-up table.
//
// Text mode: each received byte (rx_valid/rx_data) is held in a one-byte
// register and offered to the translating controller (ch_valid/ch_data/
// ch_ready). Capital letters are folded to lower case, since the rule table
// is written for lower case. A byte that arrives while the previous one is
// still waiting (the translator busy with a group) is dropped and the sticky
// `overrun` flag is set. The system relies on the slow input line (4800 baud
// against 57600 baud out) to leave the translator time between words.
//
// Load mode: load_mode is synchronised; its rising edge clears the find-entry
// table (tbl_clear) and restarts at rule 0. Every RULE_BYTES received bytes
// form one rule, least significant byte first (see braille_pkg: codes,
// right context, focus, left context, each FIELD_LEN bytes), written at the
// next address (tbl_we/tbl_addr/tbl_rule). n_rules counts the rules loaded;
// after reset it is the size of the built-in table. Load a table only while
// the translator is idle.
//
// Timing: ch_valid follows rx_valid by one cycle; tbl_we follows the last
// byte of a rule by one cycle.
//
// The data controller and its connection to the look-up table appear in the
// design's block diagram; what it does there (case folding, the overrun flag,
// the serial table-load protocol) is this design's choice.
module data_controller
  import braille_pkg::*;
#(
  parameter  int RULE_DEPTH = 512,
  localparam int AW         = $clog2(RULE_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rx_valid,
  input  char_t         rx_data,
  input  logic          load_mode,
  // to the translating controller
  output logic          ch_valid,
  output char_t         ch_data,
  input  logic          ch_ready,
  output logic          overrun,
  // to the look-up table and find-entry
  output logic          tbl_clear,
  output logic          tbl_we,
  output logic [AW-1:0] tbl_addr,
  output rule_t         tbl_rule,
  output logic [AW:0]   n_rules
);

  localparam int DEFAULT_COUNT = (N_DEFAULT_RULES < RULE_DEPTH) ? N_DEFAULT_RULES : RULE_DEPTH;
  localparam int BW            = $clog2(RULE_BYTES);

  logic [2:0]    load_sync;   // two synchroniser stages and the previous value
  logic          loading;
  logic [BW-1:0] byte_cnt;
  logic [RULE_BITS-9:0] shreg; // the bytes of a rule received so far
  logic [AW:0]   load_addr;

  assign loading = load_sync[1];

  function automatic char_t to_lower(char_t c);
    return (c >= 8'h41 && c <= 8'h5A) ? (c | 8'h20) : c;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_sync <= '0;
      ch_valid  <= 1'b0;
      ch_data   <= '0;
      overrun   <= 1'b0;
      tbl_clear <= 1'b0;
      tbl_we    <= 1'b0;
      tbl_addr  <= '0;
      tbl_rule  <= '0;
      n_rules   <= (AW+1)'(DEFAULT_COUNT);
      byte_cnt  <= '0;
      shreg     <= '0;
      load_addr <= '0;
    end else begin
      load_sync <= {load_sync[1:0], load_mode};
      tbl_clear <= 1'b0;
      tbl_we    <= 1'b0;
      if (ch_valid && ch_ready) ch_valid <= 1'b0;

      if (loading && !load_sync[2]) begin
        tbl_clear <= 1'b1;
        load_addr <= '0;
        n_rules   <= '0;
        byte_cnt  <= '0;
      end else if (rx_valid) begin
        if (loading) begin
          if (int'(byte_cnt) == RULE_BYTES - 1) begin
            byte_cnt <= '0;
            if (int'(load_addr) < RULE_DEPTH) begin
              tbl_we    <= 1'b1;
              tbl_addr  <= load_addr[AW-1:0];
              tbl_rule  <= {rx_data, shreg};
              load_addr <= load_addr + 1'b1;
              n_rules   <= load_addr + 1'b1;
            end
          end else begin
            byte_cnt <= byte_cnt + 1'b1;
          end
          shreg <= {rx_data, shreg[RULE_BITS-9:8]};
        end else if (ch_valid && !ch_ready) begin
          overrun <= 1'b1;
        end else begin
          ch_valid <= 1'b1;
          ch_data  <= to_lower(rx_data);
        end
      end
    end
  end

endmodule
