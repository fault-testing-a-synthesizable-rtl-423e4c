// Self-checking testbench of the serial line multiplexer. Random line
// activity on both sources and random requests; a reference model of the
// grant (switch only after IDLE_CLKS idle clocks of the current line) and of
// the registered output is checked every clock, and both grant directions
// must occur.
module tb_uart_mux;
  localparam int IDLE = 6;
  logic clk = 0, rst = 1, report_active = 0, dut_tx = 1, report_tx = 1;
  logic grant_report, serial_tx;
  int checks = 0, failures = 0, to_report = 0, to_dut = 0;
  logic m_grant = 0, m_out = 1;
  int m_idle = 0;

  uart_mux #(.IDLE_CLKS(IDLE)) dut (.clk, .rst, .report_active, .dut_tx, .report_tx,
                                    .grant_report, .serial_tx);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 20000; n++) begin
      logic line;
      // stimulus for the coming edge: lines mostly idle, in bursts of activity
      if ($urandom % 200 == 0) report_active = ~report_active;
      dut_tx    = ((n / 64) % 3 == 0) ? 1'($urandom) : 1'b1;
      report_tx = ((n / 80) % 4 == 1) ? 1'($urandom) : 1'b1;
      // reference model, evaluated with the values seen at the edge
      line = m_grant ? report_tx : dut_tx;
      @(posedge clk);
      m_out = line;
      if (m_grant != report_active && line && m_idle == IDLE) begin
        if (report_active) to_report++; else to_dut++;
        m_grant = report_active;
        m_idle  = 0;
      end else if (!line) m_idle = 0;
      else if (m_idle != IDLE) m_idle++;
      @(negedge clk);
      checks++;
      if (grant_report !== m_grant || serial_tx !== m_out) begin
        failures++;
        $display("n=%0d grant %b/%b out %b/%b", n, grant_report, m_grant, serial_tx, m_out);
      end
    end
    checks++;
    if (to_report == 0 || to_dut == 0) begin failures++; $display("grant never switched both ways"); end
    $display("switches to report %0d, to dut %0d", to_report, to_dut);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
