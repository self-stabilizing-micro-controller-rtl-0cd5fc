// ss_wdt: watchdog timer that can only be cleared and re-timed.
//
// The watchdog is a counter register incremented on every tick of its timer
// clock. When the count reaches the selected interval the CPU is reset. A
// count that a soft error has pushed above the interval keeps counting and
// resets the CPU when it wraps past its maximum, so any counter value leads to
// a reset unless software clears it in time.
//
// Unlike a stock MSP430 watchdog it cannot be held, cannot raise a
// non-maskable interrupt instead of a reset and cannot be used as an interval
// timer: those control bits do not exist, so no corrupted write can switch
// the watchdog off. Software can only clear the count and choose the interval.
//
// Interface: wr_i is a (granted) write of the control word. As on the MSP430,
// its high byte must be the password 5Ah, otherwise pw_err_o requests a reset;
// bit 3 (CNTCL) clears the count and bits 1:0 (IS) select the interval. With
// FIXED_MAX set (approach 2) the control word has no writable interval and
// wdrst_i clears the count and selects the longest interval, the only setting
// WDRST can make. clr_i is the CPU reset: count 0, longest interval.
//
// Timing: expired_o and overflow_o are combinational and valid in the cycle
// of the tick that reaches the threshold or wraps the count. The password
// check, bit positions and interval lengths are those of the MSP430 WDT+;
// they are this design's choice.
module ss_wdt
  import ss_pkg::*;
#(
  parameter int unsigned CNT_W     = 16,     // width of the counter register
  parameter int unsigned IVAL0     = 32768,  // interval (ticks) for IS = 00
  parameter int unsigned IVAL1     = 8192,   // IS = 01
  parameter int unsigned IVAL2     = 512,    // IS = 10
  parameter int unsigned IVAL3     = 64,     // IS = 11
  parameter bit          FIXED_MAX = 1'b0    // 1: interval fixed to IVAL0 (approach 2)
) (
  input  logic             clk,
  input  logic             rst_n,       // power-on reset
  input  logic             clr_i,       // CPU reset (synchronous)
  input  logic             tick_i,      // watchdog clock enable
  input  logic             wr_i,        // write of the control word
  input  logic [15:0]      wdata_i,     // control word
  input  logic             wdrst_i,     // WDRST instruction (approach 2)
  output logic             expired_o,   // reset request: interval elapsed
  output logic             overflow_o,  // reset request: count wrapped
  output logic             pw_err_o,    // reset request: bad password
  output logic [CNT_W-1:0] cnt_o,       // current count
  output logic [1:0]       is_o         // current interval select
);
  logic [CNT_W-1:0] cnt_q;
  logic [1:0]       is_q;
  logic [CNT_W-1:0] thr;
  logic             wr_ok;

  always_comb begin
    unique case (is_q)
      2'b00:   thr = CNT_W'(IVAL0);
      2'b01:   thr = CNT_W'(IVAL1);
      2'b10:   thr = CNT_W'(IVAL2);
      default: thr = CNT_W'(IVAL3);
    endcase
    wr_ok      = wr_i && (wdata_i[15:8] == WDT_PASSWORD);
    pw_err_o   = wr_i && (wdata_i[15:8] != WDT_PASSWORD);
    expired_o  = tick_i && (cnt_q == thr - CNT_W'(1));
    overflow_o = tick_i && (cnt_q == '1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      is_q  <= WDT_IS_MAX;
    end else if (clr_i) begin
      cnt_q <= '0;
      is_q  <= WDT_IS_MAX;
    end else if (wdrst_i) begin
      cnt_q <= '0;
      is_q  <= WDT_IS_MAX;
    end else if (wr_ok) begin
      if (wdata_i[3]) cnt_q <= '0;
      else if (tick_i) cnt_q <= cnt_q + CNT_W'(1);
      is_q <= FIXED_MAX ? WDT_IS_MAX : wdata_i[1:0];
    end else if (tick_i) begin
      cnt_q <= cnt_q + CNT_W'(1);
    end
  end

  assign cnt_o = cnt_q;
  assign is_o  = is_q;
endmodule
