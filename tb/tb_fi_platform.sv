// End-to-end testbench of the fault emulation platform at a reduced size.
//
// A behavioural DUT (toy_dut: a program counter whose next-value bits pass
// through the first W saboteur sites) runs under the platform. The bench
// decodes the platform's serial output and, for every test of every fault
// type, compares the printed report with one computed here by a reference
// model of the DUT with the same fault applied. It also counts how often
// each mechanism occurred (chain flush, scan step, each fault type, reports
// with a full and a partial address history, faults that changed the
// outcome, serial grant to either side, DUT characters passed through) and
// counts a failure for any that never did.
module tb_fi_platform;
  import fi_pkg::*;

  localparam int N       = 12;     // saboteur sites
  localparam int W       = 8;      // sites that matter (pc next-value bits)
  localparam int END_PC  = 100;
  localparam int RESETC  = 4;
  localparam int RUNC    = 400;
  localparam int CPB     = 8;
  localparam int D       = 50;
  localparam int MAX_REPORTS = 4 * (N + 1);
  localparam logic [31:0] BASE = 32'h4000_0000;

  logic clk = 0, rst = 1;
  logic [N-1:0] sab_in, sab_out;
  logic dut_rst, mem_valid, dut_tx, serial_tx, report_active, grant_report, scan_out, done;
  logic [31:0] mem_addr, fault_num;
  fault_type_t fault_type;
  ctrl_state_t state;

  fi_platform #(.N_SITES(N), .RESET_CYCLES(RESETC), .RUN_CYCLES(RUNC),
                .CLKS_PER_BIT(CPB), .DEPTH(D)) u_top (
    .clk, .rst, .sab_in, .sab_out, .dut_rst, .dut_mem_valid(mem_valid),
    .dut_mem_addr(mem_addr), .dut_uart_tx(dut_tx), .serial_tx, .fault_num,
    .fault_type, .state, .report_active, .grant_report, .scan_out, .done);

  toy_dut #(.N_SITES(N), .W(W), .END_PC(END_PC), .BASE(BASE), .CLKS_PER_BIT(CPB)) u_dut (
    .clk, .rst(dut_rst), .sab_in, .sab_out, .mem_valid, .mem_addr, .uart_tx(dut_tx));

  logic rx_v, rx_fe;
  logic [7:0] rx_d;
  uart_sink #(.CLKS_PER_BIT(CPB)) u_rx (.clk, .rx(serial_tx), .byte_valid(rx_v),
                                        .byte_data(rx_d), .framing_err(rx_fe));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_flush = 0, n_scan = 0, n_reports = 0, n_full_hist = 0, n_part_hist = 0;
  int n_changed = 0, n_to_report = 0, n_to_dut = 0, n_dut_chars = 0;
  int n_type[4] = '{0, 0, 0, 0};
  string line_buf = "";
  string ref_free = "";

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // Reference model of toy_dut under one fault: the report text it yields.
  function automatic string expected_report(int fn, int ft, output int cnt_o);
    logic [W-1:0] pc, nxt, out, prev;
    logic [31:0] q[$];
    int site, cnt;
    string s, h;
    site = fn - 1;                // fault number 0 = fault-free
    pc = 0; prev = 1; cnt = 0;
    for (int k = 0; k < RUNC; k++) begin
      bit valid;
      valid = (pc < END_PC);
      if (valid) begin
        cnt++;
        q.push_back(BASE + {pc, 2'b00});
        if (q.size() > D) void'(q.pop_front());
      end
      nxt = pc + 1'b1;
      out = nxt;
      if (site >= 0 && site < W) begin
        case (ft)
          0: out[site] = 1'b0;
          1: out[site] = 1'b1;
          2: out[site] = prev[site];
          default: out[site] = ~nxt[site];
        endcase
      end
      prev = nxt;
      if (valid) pc = out;
    end
    s = $sformatf("--- FN%08d FT%0d ---\r\nAddresses: %09d\r\n", fn, ft, cnt);
    foreach (q[i]) begin
      h = $sformatf("%08h", q[i]);
      s = {s, h.toupper(), "\r\n"};
    end
    s = {s, "-----\r\n"};
    cnt_o = cnt;
    return s;
  endfunction

  int exp_n = 0, exp_t = 0;

  task automatic finish_report(string txt);
    string e;
    int cnt;
    e = expected_report(exp_n, exp_t, cnt);
    chk(txt == e, $sformatf("report FN%0d FT%0d\n got:\n%s\n exp:\n%s", exp_n, exp_t, txt, e));
    n_reports++;
    n_type[exp_t]++;
    if (cnt >= D) n_full_hist++; else n_part_hist++;
    if (exp_n == 0) ref_free = e;
    else if (e.substr(22, e.len() - 1) != ref_free.substr(22, ref_free.len() - 1)) n_changed++;
    if (exp_n == N) begin exp_n = 0; exp_t++; end
    else exp_n++;
  endtask

  // Serial decoding: DUT characters ('M') outside reports, reports framed by
  // a line starting with "---" and ending with the "-----" line.
  bit in_report = 0;
  bit all_reports = 0;
  string rep = "";
  always @(posedge rx_v) begin
    chk(!rx_fe, "stop bit");
    if (!in_report && rx_d == 8'h4D) n_dut_chars++;
    else begin
      in_report = 1;
      rep = {rep, string'(rx_d)};
      if (rep.len() >= 7 && rep.substr(rep.len() - 7, rep.len() - 1) == "-----\r\n" &&
          rep.len() > 30) begin
        finish_report(rep);
        rep = "";
        in_report = 0;
        if (n_reports == MAX_REPORTS) all_reports = 1;
      end
    end
  end

  ctrl_state_t prev_state = ST_START;
  logic prev_grant = 0;
  always @(posedge clk) begin
    if (state == ST_FLUSH && prev_state != ST_FLUSH) n_flush++;
    if (state == ST_SCAN && prev_state != ST_SCAN) n_scan++;
    if (grant_report && !prev_grant) n_to_report++;
    if (!grant_report && prev_grant) n_to_dut++;
    // the DUT runs only in the run window
    if (state == ST_RUN) chk(!dut_rst, "DUT out of reset while running");
    prev_state <= state;
    prev_grant <= grant_report;
  end

  task automatic finish();
    chk(n_reports == MAX_REPORTS, $sformatf("reports %0d", n_reports));
    chk(n_flush > 0,      "chain flush happened");
    chk(n_full_hist > 0,  "full address history reported");
    chk(n_to_report > 0,  "serial line granted to reporting module");
    if (MAX_REPORTS > 1) begin
      chk(n_scan > 0,       "scan step happened");
      chk(n_part_hist > 0,  "partial address history reported");
      chk(n_changed > 0,    "a fault changed the outcome");
      chk(n_to_dut > 0,     "serial line given back to the DUT");
    end
    chk(n_dut_chars > 0,  "DUT characters passed through");
    for (int t = 0; t < 4; t++)
      if (MAX_REPORTS == 4 * (N + 1)) chk(n_type[t] == N + 1, $sformatf("tests of type %0d", t));
    $display("flush=%0d scan=%0d reports=%0d full=%0d partial=%0d changed=%0d grant=%0d/%0d dut_chars=%0d",
             n_flush, n_scan, n_reports, n_full_hist, n_part_hist, n_changed, n_to_report,
             n_to_dut, n_dut_chars);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // after the last expected report: the platform must reach DONE (full
  // sweep) and stay quiet
  initial begin
    wait (all_reports);
    if (MAX_REPORTS == 4 * (N + 1)) begin
      repeat (2 * N + 10) @(posedge clk);
      chk(done && state == ST_DONE, "platform done after the last fault type");
    end
    finish();
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog: reports=%0d", n_reports);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
  end
endmodule
