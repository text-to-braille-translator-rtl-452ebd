// uart_rx: serial receiver, 8 data bits, no parity, 1 stop bit, LSB first.
//
// The line is synchronised by two flip-flops. A falling edge starts a frame;
// the receiver waits half a bit period and checks that the line is still low
// (otherwise it was a glitch), then samples each data bit and the stop bit
// in the middle of its period (a bit period is CLK_HZ/BAUD clocks, rounded).
// After the stop bit it pulses `valid` for one clock with the byte in
// `data`, or pulses frame_error instead if the stop bit was low.
//
// The 100 MHz clock and the 4800 baud input rate follow the test system of
// the design; the frame format and the mid-bit sampling are this design's
// choices.
module uart_rx #(
  parameter int CLK_HZ = 100_000_000,
  parameter int BAUD   = 4800
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_error
);

  localparam int DIV = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int CW  = $clog2(DIV + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;

  state_t        state;
  logic [2:0]    sync;
  logic [CW-1:0] cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic          line;

  assign line = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= IDLE;
      sync        <= '1;
      cnt         <= '0;
      bit_idx     <= '0;
      shreg       <= '0;
      valid       <= 1'b0;
      data        <= '0;
      frame_error <= 1'b0;
    end else begin
      sync        <= {sync[1:0], rx};
      valid       <= 1'b0;
      frame_error <= 1'b0;
      unique case (state)
        IDLE: if (!line && sync[2]) begin
          cnt   <= CW'(DIV / 2 - 1);
          state <= START;
        end
        START: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else if (line) state <= IDLE;
          else begin
            cnt     <= CW'(DIV - 1);
            bit_idx <= '0;
            state   <= DATA;
          end
        end
        DATA: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            shreg <= {line, shreg[7:1]};
            cnt   <= CW'(DIV - 1);
            if (bit_idx == 3'd7) state <= STOP;
            bit_idx <= bit_idx + 1'b1;
          end
        end
        STOP: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            if (line) begin
              valid <= 1'b1;
              data  <= shreg;
            end else begin
              frame_error <= 1'b1;
            end
            state <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
