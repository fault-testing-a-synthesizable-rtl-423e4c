// Self-checking testbench of the saboteur scan chain: flushes the chain,
// shifts a single 1 along it and checks after every step that exactly the
// expected site is faulted (its output follows the fault type) while every
// other site passes its input through; also checks scan_out at the end.
module tb_saboteur_chain;
  import fi_pkg::*;

  localparam int N = 37;
  logic clk = 0, rst = 1, scan_en = 0, scan_in = 0, scan_out;
  fault_type_t ft = FT_STUCK0;
  logic [N-1:0] sig_in = '0, sig_out, prev_in;
  int checks = 0, failures = 0;

  saboteur_chain #(.N_SITES(N)) dut (.clk, .rst, .scan_en, .scan_in, .scan_out,
                                     .ft, .sig_in, .sig_out);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_site(int k);  // k = faulted site, -1 = none
    logic [N-1:0] exp;
    for (int t = 0; t < 4; t++) begin
      ft = fault_type_t'(t);
      @(negedge clk);
      prev_in = sig_in;
      @(posedge clk);           // delay flops take prev_in
      #1;
      sig_in = {$urandom, $urandom};
      #1;
      exp = sig_in;
      if (k >= 0) begin
        case (ft)
          FT_STUCK0:  exp[k] = 1'b0;
          FT_STUCK1:  exp[k] = 1'b1;
          FT_DELAYED: exp[k] = prev_in[k];
          default:    exp[k] = ~sig_in[k];
        endcase
      end
      checks++;
      if (sig_out !== exp) begin
        failures++;
        $display("site %0d ft %0d: got %h exp %h", k, t, sig_out, exp);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // flush with zeros
    scan_en = 1; scan_in = 0;
    repeat (N) @(negedge clk);
    scan_en = 0;
    check_site(-1);
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      scan_en = 1; scan_in = (k == 0);
      @(negedge clk);
      scan_en = 0; scan_in = 0;
      check_site(k);
      checks++;
      if (scan_out !== (k == N - 1)) begin failures++; $display("scan_out wrong at %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
