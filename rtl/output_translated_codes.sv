// output_translated_codes: collects the Braille ASCII codes of one group of
// characters and, once the whole group is translated, sends them out one by
// one.
//
// Codes arrive from two writers that never write in the same cycle: the
// load-translated-codes block (code_valid/code) and the find-entry block,
// which passes on a character it has no rules for (fail_valid/fail_char).
// They are stored in order. When the translating controller signals `flush`,
// the stored codes are offered on a valid/ready stream (tx_valid, tx_data,
// tx_ready) to the serial transmitter; after the last one is accepted,
// flush_done pulses for one cycle and the buffer is empty again.
//
// Sizing: a rule translates at least one character and produces at most
// FIELD_LEN codes, so a group of MAX_CHARS characters yields at most
// MAX_CHARS*FIELD_LEN codes; DEPTH is that bound and the buffer cannot
// overflow. Transmitting only after the group is complete follows the design
// description; the buffer and its handshake are this design's choices.
//
// The buffer array has no reset so that it can map to RAM; the immediate
// assertions at the end sample rst_n synchronously, which is why lint sees
// rst_n used both as an asynchronous reset and as a synchronous signal.
module output_translated_codes
  import braille_pkg::*;
#(
  parameter  int MAX_CHARS = 40,
  localparam int DEPTH     = MAX_CHARS * FIELD_LEN,
  localparam int CW        = $clog2(DEPTH + 1)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  code_valid,
  input  char_t code,
  input  logic  fail_valid,
  input  char_t fail_char,
  input  logic  flush,
  output logic  flush_done,
  output logic  tx_valid,
  output char_t tx_data,
  input  logic  tx_ready
);

  char_t         buffer [DEPTH];
  logic [CW-1:0] wr_ptr, rd_ptr;
  logic          sending;

  assign tx_valid = sending && (rd_ptr != wr_ptr);
  assign tx_data  = buffer[rd_ptr < CW'(DEPTH) ? rd_ptr : '0];

  always_ff @(posedge clk) begin
    if (!sending && wr_ptr < CW'(DEPTH)) begin
      if (code_valid)      buffer[wr_ptr] <= code;
      else if (fail_valid) buffer[wr_ptr] <= fail_char;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      sending    <= 1'b0;
      flush_done <= 1'b0;
    end else begin
      flush_done <= 1'b0;
      if (!sending) begin
        if ((code_valid || fail_valid) && wr_ptr < CW'(DEPTH)) wr_ptr <= wr_ptr + 1'b1;
        if (flush) sending <= 1'b1;
      end else begin
        if (rd_ptr == wr_ptr) begin
          sending    <= 1'b0;
          flush_done <= 1'b1;
          rd_ptr     <= '0;
          wr_ptr     <= '0;
        end else if (tx_ready) begin
          rd_ptr <= rd_ptr + 1'b1;
        end
      end
    end
  end

  // The two writers never collide, and nothing is written while sending.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_one_writer: assert (!(code_valid && fail_valid))
        else $error("two code writers in one cycle");
      a_no_write_while_sending: assert (!(sending && (code_valid || fail_valid)))
        else $error("code written while the buffer is being sent");
    end
  end

endmodule
