// Self-checking testbench of the serial transmitter: sends random bytes back
// to back, decodes the line with an independent receiver and checks every
// byte, the stop bits, and that each byte occupies exactly 10 bit times.
module tb_uart_tx;
  localparam int CPB = 8;
  logic clk = 0, rst = 1, valid = 0, ready, tx;
  logic [7:0] data = 0;
  logic rx_v, rx_fe;
  logic [7:0] rx_d;
  int checks = 0, failures = 0;
  logic [7:0] sent_q[$];
  longint accept_cycle[$];
  longint cyc = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .valid, .data, .ready, .tx);
  uart_sink #(.CLKS_PER_BIT(CPB)) rx (.clk, .rx(tx), .byte_valid(rx_v), .byte_data(rx_d),
                                      .framing_err(rx_fe));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmit side
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (4 * CPB) @(posedge clk);   // idle line before the first byte
    @(negedge clk);
    for (int n = 0; n < 60; n++) begin
      valid = 1; data = 8'($urandom);
      while (!ready) @(negedge clk);
      @(posedge clk);             // accepted on this edge (ready was high)
      sent_q.push_back(data);
      accept_cycle.push_back(cyc);
      #1;
      if (n % 7 == 3) begin
        valid = 0;
        repeat ($urandom % 30) @(negedge clk);
      end
    end
    #1 valid = 0;
  end

  // receive side
  int got = 0;
  always @(posedge rx_v) begin
    logic [7:0] e;
    e = sent_q.pop_front();
    checks++;
    if (rx_d !== e) begin failures++; $display("byte %0d got %h exp %h", got, rx_d, e); end
    checks++;
    if (rx_fe) begin failures++; $display("framing error at byte %0d", got); end
    got++;
    if (got == 60) begin
      // back-to-back bytes are accepted 10 bit times apart
      for (int i = 1; i < 60; i++) begin
        if ((i - 1) % 7 != 3) begin
          checks++;
          if (accept_cycle[i] - accept_cycle[i-1] != 10 * CPB) begin
            failures++;
            $display("byte spacing %0d at %0d", accept_cycle[i] - accept_cycle[i-1], i);
          end
        end
      end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
