// Reporting module of the fault emulation platform.
//
// On a start pulse it takes over the serial line (active goes high), converts
// the fault number and the access count to decimal, and prints:
//   --- FN<8 decimal digits> FT<fault type> ---
//   Addresses: <9 decimal digits>
//   <address, 8 hex digits>          one line per recorded address,
//   ...                              oldest first, at most HIST_DEPTH lines
//   -----
// each line ending in CR LF. The addresses and the count come from an
// addr_history instance outside this module, read through hist_idx /
// hist_addr. When the last stop bit has left the transmitter, done pulses for
// one cycle and active falls. With the default 50 history lines a report is
// 553 characters, about 6 ms at 921600 baud.
//
// As in the original platform: what is reported (fault number, fault type, number of
// accesses, last 50 addresses) and the shape of the printed lines. Own
// choices: the digit counts of the address lines, the line endings and the
// oldest-first order.
module fi_report
  import fi_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = CLK_HZ / BAUD,
  parameter int unsigned DEPTH        = HIST_DEPTH,
  localparam int unsigned IDX_W       = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [31:0]       fault_num,
  input  fault_type_t       fault_type,
  input  logic [31:0]       access_count,
  input  logic [IDX_W-1:0]  n_stored,
  output logic [IDX_W-1:0]  hist_idx,
  input  logic [31:0]       hist_addr,
  output logic              active,
  output logic              done,
  output logic              tx
);

  typedef enum logic [2:0] {
    R_IDLE, R_CONV, R_HDR, R_CNT, R_ADDR, R_END, R_DRAIN
  } rstate_t;

  localparam int unsigned HDR_LEN  = 24;  // "--- FN" 8 " FT" 1 " ---" CRLF
  localparam int unsigned CNT_LEN  = 22;  // "Addresses: " 9 CRLF
  localparam int unsigned ADDR_LEN = 10;  // 8 CRLF
  localparam int unsigned END_LEN  = 7;   // "-----" CRLF
  localparam logic [87:0] ADDR_LBL = "Addresses: ";

  rstate_t      rs;
  logic [4:0]   ci;        // character index within the current line
  logic [39:0]  fn_bcd, cnt_bcd;
  logic         fn_done, cnt_done, fn_ok, cnt_ok;
  fault_type_t  ft_q;
  logic [IDX_W-1:0] nlines;
  logic [7:0]   ch;
  logic         tx_valid, tx_ready;

  bin2bcd #(.W(32), .DIGITS(10)) u_fn (
    .clk, .rst, .start(start), .bin(fault_num), .bcd(fn_bcd), .done(fn_done));
  bin2bcd #(.W(32), .DIGITS(10)) u_cnt (
    .clk, .rst, .start(start), .bin(access_count), .bcd(cnt_bcd), .done(cnt_done));

  function automatic logic [7:0] dec_ch(input logic [3:0] d);
    return 8'h30 + {4'h0, d};
  endfunction

  function automatic logic [7:0] hex_ch(input logic [3:0] d);
    return (d < 4'd10) ? 8'h30 + {4'h0, d} : 8'h37 + {4'h0, d};
  endfunction

  // Character at position ci of the current line.
  always_comb begin
    ch = 8'h20;
    unique case (rs)
      R_HDR: begin
        if (ci < 3)                 ch = "-";
        else if (ci == 3)           ch = " ";
        else if (ci == 4)           ch = "F";
        else if (ci == 5)           ch = "N";
        else if (ci < 14)           ch = dec_ch(fn_bcd[4*(13-ci) +: 4]);
        else if (ci == 14)          ch = " ";
        else if (ci == 15)          ch = "F";
        else if (ci == 16)          ch = "T";
        else if (ci == 17)          ch = dec_ch({2'b00, ft_q});
        else if (ci == 18)          ch = " ";
        else if (ci < 22)           ch = "-";
        else if (ci == 22)          ch = 8'h0D;
        else                        ch = 8'h0A;
      end
      R_CNT: begin
        if (ci < 11)                ch = ADDR_LBL[8*(10-ci) +: 8];
        else if (ci < 20)           ch = dec_ch(cnt_bcd[4*(19-ci) +: 4]);
        else if (ci == 20)          ch = 8'h0D;
        else                        ch = 8'h0A;
      end
      R_ADDR: begin
        if (ci < 8)                 ch = hex_ch(hist_addr[4*(7-ci) +: 4]);
        else if (ci == 8)           ch = 8'h0D;
        else                        ch = 8'h0A;
      end
      R_END: begin
        if (ci < 5)                 ch = "-";
        else if (ci == 5)           ch = 8'h0D;
        else                        ch = 8'h0A;
      end
      default: ch = 8'h20;
    endcase
  end

  assign tx_valid = (rs == R_HDR) || (rs == R_CNT) || (rs == R_ADDR) || (rs == R_END);
  assign active   = (rs != R_IDLE);

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst, .valid(tx_valid), .data(ch), .ready(tx_ready), .tx(tx));

  logic sent;
  assign sent = tx_valid && tx_ready;

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      rs       <= R_IDLE;
      ci       <= '0;
      hist_idx <= '0;
      fn_ok    <= 1'b0;
      cnt_ok   <= 1'b0;
      ft_q     <= FT_STUCK0;
      nlines   <= '0;
    end else begin
      unique case (rs)
        R_IDLE: if (start) begin
          rs       <= R_CONV;
          ft_q     <= fault_type;
          nlines   <= n_stored;
          fn_ok    <= 1'b0;
          cnt_ok   <= 1'b0;
          ci       <= '0;
          hist_idx <= '0;
        end
        R_CONV: begin
          if (fn_done)  fn_ok  <= 1'b1;
          if (cnt_done) cnt_ok <= 1'b1;
          if ((fn_ok || fn_done) && (cnt_ok || cnt_done)) rs <= R_HDR;
        end
        R_HDR: if (sent) begin
          if (ci == 5'(HDR_LEN - 1)) begin ci <= '0; rs <= R_CNT; end
          else ci <= ci + 1'b1;
        end
        R_CNT: if (sent) begin
          if (ci == 5'(CNT_LEN - 1)) begin
            ci <= '0;
            rs <= (nlines == 0) ? R_END : R_ADDR;
          end else ci <= ci + 1'b1;
        end
        R_ADDR: if (sent) begin
          if (ci == 5'(ADDR_LEN - 1)) begin
            ci <= '0;
            if (hist_idx == nlines - 1'b1) rs <= R_END;
            else hist_idx <= hist_idx + 1'b1;
          end else ci <= ci + 1'b1;
        end
        R_END: if (sent) begin
          if (ci == 5'(END_LEN - 1)) begin ci <= '0; rs <= R_DRAIN; end
          else ci <= ci + 1'b1;
        end
        R_DRAIN: if (tx_ready) begin
          rs   <= R_IDLE;
          done <= 1'b1;
        end
        default: rs <= R_IDLE;
      endcase
    end
  end

endmodule
