// Self-checking testbench of the access recorder: random access streams of
// different lengths (below, at and above the depth), with recording switched
// on and off, checked against a reference queue of the last DEPTH addresses
// and an independent access count; then clear is checked.
module tb_addr_history;
  localparam int D = 50;
  localparam int IW = $clog2(D + 1);
  logic clk = 0, rst = 1, clear = 0, rec_en = 0, mem_valid = 0;
  logic [31:0] mem_addr = 0, access_count, rd_addr;
  logic [IW-1:0] n_stored, rd_idx = 0;
  int checks = 0, failures = 0;
  logic [31:0] ref_q[$];
  int ref_cnt;

  addr_history #(.DEPTH(D)) dut (.clk, .rst, .clear, .rec_en, .mem_valid, .mem_addr,
                                 .access_count, .n_stored, .rd_idx, .rd_addr);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic compare();
    chk(access_count == ref_cnt, $sformatf("count %0d exp %0d", access_count, ref_cnt));
    chk(n_stored == ref_q.size(), $sformatf("stored %0d exp %0d", n_stored, ref_q.size()));
    for (int i = 0; i < ref_q.size(); i++) begin
      rd_idx = IW'(i);
      #1;
      chk(rd_addr == ref_q[i], $sformatf("entry %0d %h exp %h", i, rd_addr, ref_q[i]));
    end
  endtask

  initial begin
    int lens[6] = '{0, 7, 49, 50, 51, 333};
    repeat (2) @(negedge clk);
    rst = 0;
    foreach (lens[k]) begin
      clear = 1; @(negedge clk); clear = 0;
      ref_q.delete(); ref_cnt = 0;
      for (int n = 0; n < lens[k] * 3; n++) begin
        rec_en    = (n < lens[k] * 2);   // last third: recording off
        mem_valid = ($urandom % 2 == 0);
        mem_addr  = $urandom;
        if (rec_en && mem_valid) begin
          ref_cnt++;
          ref_q.push_back(mem_addr);
          if (ref_q.size() > D) void'(ref_q.pop_front());
        end
        @(negedge clk);
      end
      rec_en = 0; mem_valid = 0;
      compare();
    end
    clear = 1; @(negedge clk); clear = 0;
    ref_q.delete(); ref_cnt = 0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
