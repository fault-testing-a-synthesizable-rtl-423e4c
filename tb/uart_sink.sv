// Testbench serial receiver (8N1, LSB first). Samples each bit in the middle
// of its CLKS_PER_BIT-long cell and pulses byte_valid for one clock with the
// received byte; framing_err pulses if a stop bit is low. It listens only
// after the line has been idle for two character bits.
module uart_sink #(
  parameter int unsigned CLKS_PER_BIT = 54
) (
  input  logic       clk,
  input  logic       rx,
  output logic       byte_valid,
  output logic [7:0] byte_data,
  output logic       framing_err
);
  initial begin
    byte_valid = 0; byte_data = 0; framing_err = 0;
    // wait for an idle line before looking for start bits
    for (int idle = 0; idle < 2 * CLKS_PER_BIT; ) begin
      @(posedge clk);
      idle = (rx === 1'b1) ? idle + 1 : 0;
    end
    forever begin
      @(posedge clk);
      byte_valid  = 0;
      framing_err = 0;
      if (rx == 1'b0) begin
        logic [7:0] b;
        repeat (CLKS_PER_BIT / 2) @(posedge clk);
        for (int i = 0; i < 8; i++) begin
          repeat (CLKS_PER_BIT) @(posedge clk);
          b[i] = rx;
        end
        repeat (CLKS_PER_BIT) @(posedge clk);
        if (rx !== 1'b1) framing_err = 1;
        byte_data  = b;
        byte_valid = 1;
        // wait out the rest of the stop bit
        repeat (CLKS_PER_BIT / 2 - 1) @(posedge clk);
        byte_valid = 0;
      end
    end
  end
endmodule
