// Serial transmitter of the reporting module (8 data bits, no parity, one
// stop bit, least significant bit first, idle high).
//
// A byte is accepted on a clock edge where valid and ready are both high;
// ready is low from the next cycle until the last clock of the stop bit. Each bit
// lasts CLKS_PER_BIT clocks, so one byte takes 10*CLKS_PER_BIT clocks.
//
// As in the original platform: the 921600 baud line of the serial bridge; the
// default divider is the 50 MHz platform clock over that rate, rounded down
// (54, about 0.5 % fast). Own choices: the frame format and the handshake.
module uart_tx
  import fi_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = CLK_HZ / BAUD
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       tx
);

  logic [9:0]  shreg;    // stop, data[7:0], start; shifted out LSB first
  logic [3:0]  bits_left;
  logic [15:0] baud_cnt;

  logic bit_end;  // last clock of the current bit
  assign bit_end = (baud_cnt == 16'(CLKS_PER_BIT - 1));
  // A new byte may follow in the last clock of the stop bit, so back-to-back
  // bytes are exactly 10 bit times apart.
  assign ready   = (bits_left == 0) || (bits_left == 1 && bit_end);

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '1;
      bits_left <= '0;
      baud_cnt  <= '0;
      tx        <= 1'b1;
    end else if (ready && valid) begin
      shreg     <= {1'b1, data, 1'b0};
      bits_left <= 4'd10;
      baud_cnt  <= '0;
      tx        <= 1'b0;   // start bit goes out right away
    end else if (bits_left == 0) begin
      tx <= 1'b1;
    end else if (bit_end) begin
      baud_cnt  <= '0;
      bits_left <= bits_left - 1'b1;
      shreg     <= {1'b1, shreg[9:1]};
      tx        <= (bits_left == 1) ? 1'b1 : shreg[1];
    end else begin
      baud_cnt <= baud_cnt + 1'b1;
    end
  end

endmodule
