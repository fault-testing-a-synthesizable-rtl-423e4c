// Serial line multiplexer between the DUT's UART and the reporting module.
//
// While report_active is high the reporting module owns the line to the
// USB-serial bridge; otherwise the DUT's UART does. The grant changes only
// after the line now granted has been idle (high) for IDLE_CLKS clocks, so a
// switch never lands inside a low bit and cannot forge a start bit. The
// output is registered (one clock of delay).
//
// As in the original platform: a multiplexer granting the serial bridge to the
// reporting module while it is active. Own choice: the idle guard. The
// reporting module spends more than IDLE_CLKS clocks on its decimal
// conversion before its first start bit, and the DUT is held in reset while
// it reports, so the guard delays no character.
module uart_mux
  import fi_pkg::*;
#(
  parameter int unsigned IDLE_CLKS = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic report_active,
  input  logic dut_tx,
  input  logic report_tx,
  output logic grant_report,
  output logic serial_tx
);

  logic [15:0] idle_cnt;
  logic        line;

  assign line = grant_report ? report_tx : dut_tx;

  always_ff @(posedge clk) begin
    if (rst) begin
      grant_report <= 1'b0;
      idle_cnt     <= '0;
      serial_tx    <= 1'b1;
    end else begin
      serial_tx <= line;
      if (!line)                              idle_cnt <= '0;
      else if (idle_cnt != 16'(IDLE_CLKS))    idle_cnt <= idle_cnt + 1'b1;
      if (grant_report != report_active && line && idle_cnt == 16'(IDLE_CLKS)) begin
        grant_report <= report_active;
        idle_cnt     <= '0;
      end
    end
  end

endmodule
