// Self-checking testbench of the saboteur cell: scans the fault flop on and
// off and checks the output for all four fault types against a reference
// model (pass-through, 0, 1, previous-cycle input, inverted input).
module tb_saboteur;
  import fi_pkg::*;

  logic clk = 0, rst = 1, scan_en = 0, si = 0, so, in = 0, out;
  fault_type_t ft = FT_STUCK0;
  int checks = 0, failures = 0;
  logic prev_in;

  saboteur dut (.clk, .rst, .scan_en, .si, .so, .ft, .in, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic model(logic f, fault_type_t t, logic i, logic p);
    if (!f) return i;
    case (t)
      FT_STUCK0:  return 1'b0;
      FT_STUCK1:  return 1'b1;
      FT_DELAYED: return p;
      default:    return ~i;
    endcase
  endfunction

  logic exp_so;

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0; exp_so = 0; prev_in = in;
    for (int n = 0; n < 2000; n++) begin
      // choose inputs for the coming cycle on the falling edge
      scan_en = ($urandom % 4 == 0);
      si      = 1'($urandom);
      ft      = fault_type_t'($urandom % 4);
      @(posedge clk);
      if (scan_en) exp_so = si;
      prev_in = in;           // value sampled by the delay flop
      #1;
      checks++;
      if (so !== exp_so) begin failures++; $display("so mismatch at %0d", n); end
      @(negedge clk);
      in = 1'($urandom);
      #1;
      checks++;
      if (out !== model(exp_so, ft, in, prev_in)) begin
        failures++;
        $display("out mismatch n=%0d f=%0b ft=%0d in=%0b prev=%0b out=%0b", n, exp_so, ft, in, prev_in, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
