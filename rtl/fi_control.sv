// Fault emulation control module.
//
// A state machine that walks through every fault of every type:
//   START  -> FLUSH    after the platform reset is released
//   FLUSH  -> RESET    after SCAN_LENGTH scan steps shifting zeros (no fault)
//   RESET  -> RUN      after RESET_CYCLES with the DUT held in reset
//   RUN    -> REPORT   after RUN_CYCLES with the DUT running
//   REPORT -> SCAN     when the reporting module signals report_done
//   SCAN   -> RESET    if N < SCAN_LENGTH: advance the fault by one site
//   SCAN   -> INC_TYPE if N = SCAN_LENGTH: every site tested with this type
//   INC_TYPE -> FLUSH  if TYPE < 3, with TYPE incremented
//   INC_TYPE -> DONE   if TYPE = 3
// N (fault_num) is the fault under test: 0 is the fault-free run after a
// flush, and N = k means the saboteur at chain position k-1 is faulted. The
// first scan step after a flush shifts in a single 1, later steps shift 0, so
// the 1 moves one site per test. Each type therefore runs SCAN_LENGTH+1
// tests. The DUT is held in reset in every state except RUN; mem_rec_en is
// high in RUN so that only accesses of the test period are recorded, and
// hist_clear is high in RESET to empty the history before each test.
// report_start is a one-cycle pulse in the first REPORT cycle.
//
// As in the original platform: the states, their transitions and conditions, and the
// run time (70 ms at the 50 MHz platform clock). Own choices: the reset time,
// the clearing and recording windows and the meaning of N = 0.
module fi_control
  import fi_pkg::*;
#(
  parameter int unsigned SCAN_LENGTH  = N_FAULT_SITES,
  parameter int unsigned RESET_CYCLES = 1000,
  parameter int unsigned RUN_CYCLES   = RUN_CYCLES_DEFAULT
) (
  input  logic        clk,
  input  logic        rst,           // platform reset (synchronous)
  // saboteur scan chain
  output logic        scan_en,
  output logic        scan_in,
  output fault_type_t fault_type,
  // device under test
  output logic        dut_rst,
  // reporting module
  output logic        hist_clear,
  output logic        mem_rec_en,
  output logic        report_start,
  input  logic        report_done,
  output logic [31:0] fault_num,
  // status
  output ctrl_state_t state,
  output logic        done
);

  logic [31:0] cnt;  // cycles spent in the current timed state

  // report_start pulses in the first REPORT cycle, once the access count and
  // history include the last run cycle.
  always_ff @(posedge clk) begin
    if (rst) report_start <= 1'b0;
    else     report_start <= (state == ST_RUN) && (cnt == RUN_CYCLES - 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= ST_START;
      cnt        <= '0;
      fault_num  <= '0;
      fault_type <= FT_STUCK0;
    end else begin
      unique case (state)
        ST_START: begin
          cnt   <= '0;
          state <= ST_FLUSH;
        end
        ST_FLUSH: begin
          if (cnt == SCAN_LENGTH - 1) begin
            cnt       <= '0;
            fault_num <= '0;
            state     <= ST_RESET;
          end else begin
            cnt <= cnt + 1;
          end
        end
        ST_RESET: begin
          if (cnt == RESET_CYCLES - 1) begin
            cnt   <= '0;
            state <= ST_RUN;
          end else begin
            cnt <= cnt + 1;
          end
        end
        ST_RUN: begin
          if (cnt == RUN_CYCLES - 1) begin
            cnt   <= '0;
            state <= ST_REPORT;
          end else begin
            cnt <= cnt + 1;
          end
        end
        ST_REPORT: begin
          if (report_done) state <= ST_SCAN;
        end
        ST_SCAN: begin
          if (fault_num < SCAN_LENGTH) begin
            fault_num <= fault_num + 1;
            state     <= ST_RESET;
          end else begin
            state <= ST_INC_TYPE;
          end
        end
        ST_INC_TYPE: begin
          if (fault_type != FT_INVERT) begin
            fault_type <= fault_type_t'(fault_type + 2'd1);
            state      <= ST_FLUSH;
          end else begin
            state <= ST_DONE;
          end
        end
        ST_DONE: ;
      endcase
    end
  end

  always_comb begin
    scan_en      = (state == ST_FLUSH) || (state == ST_SCAN && fault_num < SCAN_LENGTH);
    scan_in      = (state == ST_SCAN) && (fault_num == '0);
    dut_rst      = (state != ST_RUN);
    hist_clear   = (state == ST_RESET);
    mem_rec_en   = (state == ST_RUN);
    done         = (state == ST_DONE);
  end

  // The reporting module answers only a request that was made.
  a_done_in_report: assert property (@(posedge clk) disable iff (rst)
    report_done |-> state == ST_REPORT);

endmodule
