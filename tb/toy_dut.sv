// Behavioural stand-in for the device under test, used only by the platform
// testbenches (the real device is a processor netlist). A W-bit program
// counter steps from 0 to END_PC, making one external memory access per step
// at BASE + 4*pc, then stops and sends one 'M' on its own serial port.
// The counter's next-value bits pass through saboteur sites 0..W-1: the
// counter loads sab_out[W-1:0] (the possibly faulted pc+1). Sites W and up
// carry other copies of pc bits whose outputs are ignored, so faults there
// have no effect, like gate inputs that do not matter to the program.
module toy_dut #(
  parameter int unsigned N_SITES      = 16,
  parameter int unsigned W            = 8,
  parameter int unsigned END_PC       = 100,
  parameter logic [31:0] BASE         = 32'h4000_0000,
  parameter int unsigned CLKS_PER_BIT = 8
) (
  input  logic               clk,
  input  logic               rst,
  output logic [N_SITES-1:0] sab_in,
  input  logic [N_SITES-1:0] sab_out,
  output logic               mem_valid,
  output logic [31:0]        mem_addr,
  output logic               uart_tx
);
  logic [W-1:0] pc;
  logic         running, sent;

  assign running   = (32'(pc) < END_PC);
  assign mem_valid = !rst && running;
  assign mem_addr  = BASE + {pc, 2'b00};

  logic [W-1:0] nxt;
  assign nxt = pc + 1'b1;
  localparam int unsigned REP = N_SITES / W + 1;
  logic [REP*W-1:0] pc_rep;
  assign pc_rep = {REP{pc}};
  assign sab_in = {pc_rep[N_SITES-1:W], nxt};

  always_ff @(posedge clk) begin
    if (rst)          pc <= '0;
    else if (running) pc <= sab_out[W-1:0];
  end

  logic tx_valid, tx_ready;
  always_ff @(posedge clk) begin
    if (rst) sent <= 1'b0;
    else if (!running && tx_ready) sent <= 1'b1;
  end
  assign tx_valid = !rst && !running && !sent;

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst, .valid(tx_valid), .data(8'h4D), .ready(tx_ready), .tx(uart_tx));
endmodule
