// Gate-level fault emulation platform (top level).
//
// Wraps a device-under-test netlist in which every gate input is routed
// through a saboteur. The saboteurs form one scan chain; the control module
// shifts a single 1 along it so that exactly one gate input is faulted per
// test, with a global fault type (stuck-at-0, stuck-at-1, delayed, inverted).
// For each fault the DUT is reset, run for a fixed time while its external
// memory accesses are counted and the last addresses kept, and then the
// reporting module takes the serial line and prints the fault number, fault
// type, access count and address history. The next fault is scanned in while
// the DUT is held in reset; after the last site the next fault type starts
// with a flush of the chain. The run of fault number 0 after each flush is
// the fault-free reference.
//
// The DUT itself (processor netlist and its system) is outside this module:
// sab_in / sab_out carry the N_SITES gate-input signals into and out of the
// saboteurs, dut_rst resets the DUT, dut_mem_valid / dut_mem_addr report its
// external memory accesses, and dut_uart_tx is its own serial output.
// serial_tx goes to the USB-serial bridge.
//
// Timing (defaults, 50 MHz): 70 ms run, about 6 ms report, SCAN_LENGTH
// clocks per flush, one clock per scan step. As in the original platform: the block
// structure, the state sequence, the 15,384 fault sites, the run time and the
// baud rate. Own choices: the reset time, the single-clock scan and the
// interface signal names.
module fi_platform
  import fi_pkg::*;
#(
  parameter int unsigned N_SITES      = N_FAULT_SITES,
  parameter int unsigned RESET_CYCLES = 1000,
  parameter int unsigned RUN_CYCLES   = RUN_CYCLES_DEFAULT,
  parameter int unsigned CLKS_PER_BIT = CLK_HZ / BAUD,
  parameter int unsigned DEPTH        = HIST_DEPTH,
  parameter int unsigned MUX_IDLE     = 16
) (
  input  logic               clk,
  input  logic               rst,
  // saboteur sites of the DUT netlist
  input  logic [N_SITES-1:0] sab_in,
  output logic [N_SITES-1:0] sab_out,
  // DUT system
  output logic               dut_rst,
  input  logic               dut_mem_valid,
  input  logic [31:0]        dut_mem_addr,
  input  logic               dut_uart_tx,
  // serial bridge
  output logic               serial_tx,
  // status
  output logic [31:0]        fault_num,
  output fault_type_t        fault_type,
  output ctrl_state_t        state,
  output logic               report_active,
  output logic               grant_report,   // serial line owned by the reporting module
  output logic               scan_out,       // end of the saboteur chain
  output logic               done
);

  localparam int unsigned IDX_W = $clog2(DEPTH + 1);

  logic              scan_en, scan_in;
  logic              hist_clear, mem_rec_en, report_start, report_done;
  logic [31:0]       access_count;
  logic [IDX_W-1:0]  n_stored, hist_idx;
  logic [31:0]       hist_addr;
  logic              report_tx;

  fi_control #(
    .SCAN_LENGTH (N_SITES),
    .RESET_CYCLES(RESET_CYCLES),
    .RUN_CYCLES  (RUN_CYCLES)
  ) u_ctrl (
    .clk, .rst,
    .scan_en, .scan_in, .fault_type,
    .dut_rst,
    .hist_clear, .mem_rec_en, .report_start, .report_done,
    .fault_num, .state, .done
  );

  saboteur_chain #(.N_SITES(N_SITES)) u_chain (
    .clk, .rst,
    .scan_en, .scan_in, .scan_out,
    .ft     (fault_type),
    .sig_in (sab_in),
    .sig_out(sab_out)
  );

  addr_history #(.DEPTH(DEPTH), .ADDR_W(32), .COUNT_W(32)) u_hist (
    .clk, .rst,
    .clear    (hist_clear),
    .rec_en   (mem_rec_en),
    .mem_valid(dut_mem_valid),
    .mem_addr (dut_mem_addr),
    .access_count,
    .n_stored,
    .rd_idx   (hist_idx),
    .rd_addr  (hist_addr)
  );

  fi_report #(.CLKS_PER_BIT(CLKS_PER_BIT), .DEPTH(DEPTH)) u_report (
    .clk, .rst,
    .start     (report_start),
    .fault_num,
    .fault_type,
    .access_count,
    .n_stored,
    .hist_idx,
    .hist_addr,
    .active    (report_active),
    .done      (report_done),
    .tx        (report_tx)
  );

  uart_mux #(.IDLE_CLKS(MUX_IDLE)) u_mux (
    .clk, .rst,
    .report_active,
    .dut_tx   (dut_uart_tx),
    .report_tx,
    .grant_report,
    .serial_tx
  );

endmodule
