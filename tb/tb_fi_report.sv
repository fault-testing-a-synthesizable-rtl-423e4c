// Self-checking testbench of the reporting module. A stand-in history array
// feeds it addresses; an independent serial receiver decodes its output and
// the text is compared with the expected report built here with $sformatf.
// Also checks active/done and that the report takes one character time per
// character, plus the decimal conversion, plus the final drain.
module tb_fi_report;
  import fi_pkg::*;
  localparam int CPB = 8, D = 50, IW = $clog2(D + 1);

  logic clk = 0, rst = 1, start = 0, active, done, tx;
  logic [31:0] fault_num = 0, access_count = 0, hist_addr;
  fault_type_t fault_type = FT_STUCK0;
  logic [IW-1:0] n_stored = 0, hist_idx;
  logic [31:0] hist_mem [D];
  logic rx_v, rx_fe;
  logic [7:0] rx_d;
  string got = "";
  int checks = 0, failures = 0;
  longint cyc = 0;

  fi_report #(.CLKS_PER_BIT(CPB), .DEPTH(D)) dut (
    .clk, .rst, .start, .fault_num, .fault_type, .access_count, .n_stored,
    .hist_idx, .hist_addr, .active, .done, .tx);
  uart_sink #(.CLKS_PER_BIT(CPB)) rx (.clk, .rx(tx), .byte_valid(rx_v), .byte_data(rx_d),
                                      .framing_err(rx_fe));

  assign hist_addr = (int'(hist_idx) < D) ? hist_mem[hist_idx] : 32'hDEAD_BEEF;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge rx_v) begin
    got = {got, string'(rx_d)};
    checks++;
    if (rx_fe) begin failures++; $display("framing error"); end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic run_case(int fn, int ft, int cnt, int ns);
    string exp;
    longint t0, t1;
    for (int i = 0; i < D; i++) hist_mem[i] = $urandom;
    exp = $sformatf("--- FN%08d FT%0d ---\r\nAddresses: %09d\r\n", fn % 100000000, ft, cnt);
    for (int i = 0; i < ns; i++) begin
      string h;
      h = $sformatf("%08h", hist_mem[i]);
      exp = {exp, h.toupper(), "\r\n"};
    end
    exp = {exp, "-----\r\n"};
    got = "";
    @(negedge clk);
    fault_num = fn; fault_type = fault_type_t'(ft); access_count = cnt; n_stored = IW'(ns);
    start = 1; t0 = cyc;
    @(negedge clk);
    start = 0;
    chk(active, "active after start");
    while (!done) @(negedge clk);
    t1 = cyc;
    @(negedge clk);
    chk(!active, "inactive after done");
    repeat (2 * CPB) @(negedge clk);
    chk(got == exp, $sformatf("text\n got:%s\n exp:%s", got, exp));
    // 32+1 clocks conversion, one character time per character
    chk((t1 - t0) >= exp.len() * 10 * CPB && (t1 - t0) <= exp.len() * 10 * CPB + 40,
        $sformatf("report took %0d clocks for %0d chars", t1 - t0, exp.len()));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    run_case(0, 0, 21538, 50);
    run_case(12345, 2, 7, 7);
    run_case(15384, 3, 0, 0);
    run_case(123456789, 1, 630000000, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
