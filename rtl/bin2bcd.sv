// Sequential binary to BCD converter (shift and add 3), used by the
// reporting module to print counts in decimal.
//
// A pulse on start loads bin; W clocks later done pulses for one cycle and
// bcd holds DIGITS decimal digits, digit 0 in bcd[3:0]. Digits beyond DIGITS
// are dropped (the value is printed modulo 10**DIGITS).
module bin2bcd #(
  parameter int unsigned W      = 32,
  parameter int unsigned DIGITS = 10
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [W-1:0]      bin,
  output logic [4*DIGITS-1:0] bcd,
  output logic              done
);

  logic [W-1:0]       sh;
  logic [$clog2(W+1)-1:0] left;
  logic               busy;
  logic [4*DIGITS-1:0] adj;

  // Add 3 to every digit of 5 or more before the next shift.
  always_comb begin
    for (int d = 0; d < DIGITS; d++) begin
      adj[4*d +: 4] = (bcd[4*d +: 4] >= 4'd5) ? bcd[4*d +: 4] + 4'd3 : bcd[4*d +: 4];
    end
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy <= 1'b0;
      left <= '0;
      sh   <= '0;
      bcd  <= '0;
    end else if (start) begin
      busy <= 1'b1;
      sh   <= bin;
      bcd  <= '0;
      left <= ($clog2(W+1))'(W);
    end else if (busy) begin
      bcd  <= {adj[4*DIGITS-2:0], sh[W-1]};
      sh   <= sh << 1;
      left <= left - 1'b1;
      if (left == 1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

endmodule
