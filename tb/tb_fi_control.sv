// Self-checking testbench of the control state machine at a small size.
// A model of the scan chain follows scan_en / scan_in; for every test the
// bench checks the fault number and type, that the chain holds exactly the
// expected single fault (none for fault number 0), that reset and run last
// RESET_CYCLES and RUN_CYCLES clocks, and that all 4 x (SCAN_LENGTH+1) tests
// run before done.
module tb_fi_control;
  import fi_pkg::*;
  localparam int SL = 5, RC = 3, RUNC = 10;

  logic clk = 0, rst = 1;
  logic scan_en, scan_in, dut_rst, hist_clear, mem_rec_en, report_start, done;
  logic report_done = 0;
  fault_type_t fault_type;
  ctrl_state_t state;
  logic [31:0] fault_num;
  int checks = 0, failures = 0;
  logic [SL-1:0] chain_m = '1;   // model of the scan flops
  int rst_len = 0, run_len = 0, tests = 0, exp_n = 0, exp_t = 0;

  fi_control #(.SCAN_LENGTH(SL), .RESET_CYCLES(RC), .RUN_CYCLES(RUNC)) dut (
    .clk, .rst, .scan_en, .scan_in, .fault_type, .dut_rst, .hist_clear, .mem_rec_en,
    .report_start, .report_done, .fault_num, .state, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (n=%0d t=%0d)", msg, exp_n, exp_t); end
  endtask

  // reporting module stand-in: answers report_start after a random delay
  initial begin
    forever begin
      @(posedge clk);
      if (report_start) begin
        repeat (1 + $urandom % 5) @(posedge clk);
        report_done <= 1;
        @(posedge clk);
        report_done <= 0;
      end
    end
  end

  always @(posedge clk) if (!rst) begin
    if (scan_en) chain_m <= {chain_m[SL-2:0], scan_in};
    if (dut_rst && state == ST_RESET) rst_len++;
    if (!dut_rst) begin
      chk(mem_rec_en, "recording enabled while running");
      if (run_len == 0) begin
        chk(rst_len == RC, $sformatf("reset length %0d", rst_len));
        chk(fault_num == exp_n, $sformatf("fault number %0d", fault_num));
        chk(fault_type == fault_type_t'(exp_t), "fault type");
        chk(chain_m == ((exp_n == 0) ? '0 : (SL'(1) << (exp_n - 1))),
            $sformatf("chain %b", chain_m));
      end
      run_len++;
    end
    if (report_start) begin
      chk(run_len == RUNC, $sformatf("run length %0d", run_len));
      run_len = 0; rst_len = 0; tests++;
      if (exp_n == SL) begin exp_n = 0; exp_t++; end
      else exp_n++;
    end
    if (state == ST_FLUSH) chk(scan_en && !scan_in && dut_rst, "flush shifts zeros in reset");
    if (done) begin
      chk(tests == 4 * (SL + 1), $sformatf("tests %0d", tests));
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
  end
endmodule
