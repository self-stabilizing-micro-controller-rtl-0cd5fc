// ssmc_top: the three self-stabilizing micro controller guards side by side.
//
// Each of the three alternative guards (register/ROM compare, WDRST
// instruction, 2^X byte alignment) is a complete ss_core with its own program
// ROM, watchdog and reset controller, serving its own CPU through its own
// hook and control ports (index 0, 1, 2 in that order). They share only the
// clock, the power-on reset and the watchdog tick. See ss_core for the CPU
// interface and its timing. The MSP430 CPU cores are outside this module.
// The three approaches are alternatives (approach 2 removes the watchdog
// register that approach 1 guards); placing all three in one top so each can
// be exercised is this implementation's choice.
module ssmc_top
  import ss_pkg::*;
#(
  parameter int unsigned ALIGN_X    = 3,
  parameter logic [15:0] ROM_BASE   = 16'h4000,
  parameter int unsigned ROM_AW     = 14,
  parameter int unsigned WDT_CNT_W  = 16,
  parameter int unsigned WDT_IVAL0  = 32768,
  parameter int unsigned WDT_IVAL1  = 8192,
  parameter int unsigned WDT_IVAL2  = 512,
  parameter int unsigned WDT_IVAL3  = 64,
  parameter int unsigned RST_CYCLES = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wdt_tick,
  input  cpu_hooks_t           cpu_i     [3],
  output cpu_ctl_t             ctl_o     [3],
  output rst_src_t             cause_o   [3],
  output logic [WDT_CNT_W-1:0] wdt_cnt_o [3]
);
  ss_core #(
    .APPROACH(APP_ROM_COMPARE), .ALIGN_X(ALIGN_X), .ROM_BASE(ROM_BASE), .ROM_AW(ROM_AW),
    .WDT_CNT_W(WDT_CNT_W), .WDT_IVAL0(WDT_IVAL0), .WDT_IVAL1(WDT_IVAL1),
    .WDT_IVAL2(WDT_IVAL2), .WDT_IVAL3(WDT_IVAL3), .RST_CYCLES(RST_CYCLES)
  ) u_a1 (
    .clk, .rst_n, .wdt_tick, .cpu_i(cpu_i[0]), .ctl_o(ctl_o[0]),
    .cause_o(cause_o[0]), .wdt_cnt_o(wdt_cnt_o[0]));

  ss_core #(
    .APPROACH(APP_WDRST), .ALIGN_X(ALIGN_X), .ROM_BASE(ROM_BASE), .ROM_AW(ROM_AW),
    .WDT_CNT_W(WDT_CNT_W), .WDT_IVAL0(WDT_IVAL0), .WDT_IVAL1(WDT_IVAL1),
    .WDT_IVAL2(WDT_IVAL2), .WDT_IVAL3(WDT_IVAL3), .RST_CYCLES(RST_CYCLES)
  ) u_a2 (
    .clk, .rst_n, .wdt_tick, .cpu_i(cpu_i[1]), .ctl_o(ctl_o[1]),
    .cause_o(cause_o[1]), .wdt_cnt_o(wdt_cnt_o[1]));

  ss_core #(
    .APPROACH(APP_ALIGN), .ALIGN_X(ALIGN_X), .ROM_BASE(ROM_BASE), .ROM_AW(ROM_AW),
    .WDT_CNT_W(WDT_CNT_W), .WDT_IVAL0(WDT_IVAL0), .WDT_IVAL1(WDT_IVAL1),
    .WDT_IVAL2(WDT_IVAL2), .WDT_IVAL3(WDT_IVAL3), .RST_CYCLES(RST_CYCLES)
  ) u_a3 (
    .clk, .rst_n, .wdt_tick, .cpu_i(cpu_i[2]), .ctl_o(ctl_o[2]),
    .cause_o(cause_o[2]), .wdt_cnt_o(wdt_cnt_o[2]));
endmodule
