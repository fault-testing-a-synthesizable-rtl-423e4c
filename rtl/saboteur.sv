// Saboteur: fault injection cell placed on one gate input of a netlist.
//
// Each saboteur holds one scan flop. The scan flops of all saboteurs form a
// shift register (si -> so), advanced on clock edges where scan_en is high.
// When the scan flop holds 1, the cell's output is corrupted according to the
// global fault type: tied to 0, tied to 1, the input delayed by one clock
// (a second flop, sampling the input on every clock), or the inverted input.
// When the scan flop holds 0 the input passes straight through.
//
// Timing: `out` is combinational in `in` (as a gate input must be). The
// delayed value is the input of the previous clock cycle.
//
// As in the original platform: the scan flop, the delay flop and the four-way fault
// selection. Own choice: the scan chain is clocked by the system clock with a
// scan enable instead of a separate scan clock, so the whole platform is one
// clock domain; the scan flop has a synchronous reset to the fault-free state.
module saboteur
  import fi_pkg::*;
(
  input  logic        clk,
  input  logic        rst,      // synchronous, clears the scan flop
  input  logic        scan_en,  // shift the scan chain by one on this edge
  input  logic        si,       // scan input from the previous saboteur
  output logic        so,       // scan flop: 1 = this site is faulted
  input  fault_type_t ft,       // global fault type
  input  logic        in,       // fault-free signal from the driving gate
  output logic        out       // signal delivered to the gate input
);

  logic di;  // input delayed by one clock

  always_ff @(posedge clk) begin
    if (rst)          so <= 1'b0;
    else if (scan_en) so <= si;
  end

  always_ff @(posedge clk) di <= in;

  always_comb begin
    if (so) begin
      unique case (ft)
        FT_STUCK0:  out = 1'b0;
        FT_STUCK1:  out = 1'b1;
        FT_DELAYED: out = di;
        FT_INVERT:  out = ~in;
      endcase
    end else begin
      out = in;
    end
  end

endmodule
