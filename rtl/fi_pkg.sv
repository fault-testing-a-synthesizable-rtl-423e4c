// Shared types and constants of the gate-level fault emulation platform.
//
// The platform injects one static fault at a time into a netlist through a
// scan chain of saboteur cells. A global two-bit fault type selects how the
// faulted saboteur corrupts its gate input: stuck-at-0, stuck-at-1, delayed by
// one clock, or inverted (the encoding 0..3 follows the case labels of the
// saboteur). The control state names follow the platform's state diagram.
package fi_pkg;

  // Fault type applied by every saboteur whose scan flop holds a 1.
  typedef enum logic [1:0] {
    FT_STUCK0  = 2'd0,
    FT_STUCK1  = 2'd1,
    FT_DELAYED = 2'd2,
    FT_INVERT  = 2'd3
  } fault_type_t;

  // Control module states (flush, reset, run, report, scan, next type, done).
  typedef enum logic [2:0] {
    ST_START    = 3'd0,
    ST_FLUSH    = 3'd1,
    ST_RESET    = 3'd2,
    ST_RUN      = 3'd3,
    ST_REPORT   = 3'd4,
    ST_SCAN     = 3'd5,
    ST_INC_TYPE = 3'd6,
    ST_DONE     = 3'd7
  } ctrl_state_t;

  // Platform clock: the emulated design is constrained at 50 MHz.
  localparam int unsigned CLK_HZ      = 50_000_000;
  // Serial line shared by the DUT UART and the reporting module.
  localparam int unsigned BAUD        = 921_600;
  // Number of gate inputs of the LEON3 integer unit netlist.
  localparam int unsigned N_FAULT_SITES = 15_384;
  // The CPU runs 70 ms per test.
  localparam int unsigned RUN_CYCLES_DEFAULT = CLK_HZ / 1000 * 70;
  // Depth of the recorded address history.
  localparam int unsigned HIST_DEPTH  = 50;

endpackage
