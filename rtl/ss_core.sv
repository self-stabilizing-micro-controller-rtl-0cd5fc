// ss_core: guard hardware of one self-stabilizing micro controller variant.
//
// A soft error in the PC can make the CPU execute the data fields of
// instructions as if they were opcodes. If such a misread loop happens to
// clear the watchdog, the CPU is trapped for good. This core surrounds an
// MSP430-class CPU so that it always returns to its intended code in bounded
// time. Common to every variant:
//  * pc_restrict: fetch addresses and loaded PC values cannot leave ROM.
//  * ss_wdt: a watchdog that cannot be stopped, only cleared and re-timed.
//  * wdrst_decoder: opcode words below 1000h are invalid and reset the CPU.
//  * reset_ctrl: every detector resets the CPU.
// APPROACH then selects how trapped watchdog-clearing loops are excluded:
//  * APP_ROM_COMPARE: a WDTCTL write is granted only to the one instruction
//    whose address is stored in the last ROM word (wdt_access_check).
//  * APP_WDRST: WDTCTL is removed from the address space (writes to 0120h go
//    nowhere); only the 32 bit WDRST instruction clears the watchdog, always to
//    its longest interval.
//  * APP_ALIGN: code is aligned to 2^X byte blocks, relative jumps count
//    blocks (jump_target) and every other PC write must be block aligned
//    (pc_align_check).
//
// CPU interface (ss_pkg::cpu_hooks_t in, cpu_ctl_t out): fetch data arrives
// one cycle after the fetch request. pc_load/pc_new are combinational in the
// cycle of a jump or PC write; the CPU loads pc_new instead of its own value.
// stall (approach 1 only) holds the CPU for two cycles on each WDTCTL write.
// rst resets the CPU and also clears the guard's own state.
//
// The three mechanisms and the ROM-only, always-on watchdog rules follow the
// design as proposed. The hook interface, the ROM window, the watchdog
// register layout and the reset length are this implementation's choices.
module ss_core
  import ss_pkg::*;
#(
  parameter approach_e   APPROACH   = APP_ALIGN,
  parameter int unsigned ALIGN_X    = 3,         // 8 byte blocks
  parameter logic [15:0] ROM_BASE   = 16'h4000,
  parameter int unsigned ROM_AW     = 14,        // 16 KB ROM
  parameter int unsigned WDT_CNT_W  = 16,
  parameter int unsigned WDT_IVAL0  = 32768,
  parameter int unsigned WDT_IVAL1  = 8192,
  parameter int unsigned WDT_IVAL2  = 512,
  parameter int unsigned WDT_IVAL3  = 64,
  parameter int unsigned RST_CYCLES = 4,
  parameter string       ROM_INIT   = ""
) (
  input  logic                 clk,
  input  logic                 rst_n,      // power-on reset
  input  logic                 wdt_tick,   // watchdog clock enable
  input  cpu_hooks_t           cpu_i,
  output cpu_ctl_t             ctl_o,
  output rst_src_t             cause_o,    // why the CPU was last reset
  output logic [WDT_CNT_W-1:0] wdt_cnt_o
);
  localparam logic [15:0] VALID_LOC =
      16'((32'(ROM_BASE) | ((32'd1 << ROM_AW) - 32'd1)) & ~32'd1);
  localparam bit ALIGNED = (APPROACH == APP_ALIGN);

  logic        puc;
  rst_src_t    src;
  logic [15:0] fetch_addr, jmp_dest, pc_raw, pc_new;
  logic        rom_b_rd;
  logic [15:0] rom_b_addr, rom_b_rdata;
  logic        wdt_wr, wdrst, illegal, misaligned, bad_access, stall;
  logic        wdt_expired, wdt_overflow, wdt_pw_err;
  logic [1:0]  wdt_is;

  // ---- program address path -------------------------------------------
  pc_restrict #(.ROM_BASE(ROM_BASE), .ROM_AW(ROM_AW)) u_fetch_restrict (
    .addr_i(cpu_i.fetch_addr), .addr_o(fetch_addr));

  jump_target #(.ALIGNED(ALIGNED), .X(ALIGN_X), .OFF_W(10)) u_jump (
    .pc_i(cpu_i.jmp_pc), .off_i(cpu_i.jmp_off), .target_o(jmp_dest));

  always_comb pc_raw = cpu_i.jmp ? jmp_dest : cpu_i.pc_wr_data;

  pc_restrict #(.ROM_BASE(ROM_BASE), .ROM_AW(ROM_AW)) u_pc_restrict (
    .addr_i(pc_raw), .addr_o(pc_new));

  prog_rom #(.ROM_AW(ROM_AW), .INIT_FILE(ROM_INIT)) u_rom (
    .clk,
    .a_rd_i(cpu_i.fetch), .a_addr_i(fetch_addr[ROM_AW-1:0]), .a_rdata_o(ctl_o.fetch_data),
    .b_rd_i(rom_b_rd),    .b_addr_i(rom_b_addr[ROM_AW-1:0]), .b_rdata_o(rom_b_rdata));

  // ---- instruction decode: WDRST and invalid opcodes --------------------
  wdrst_decoder #(.WDRST_EN(APPROACH == APP_WDRST)) u_dec (
    .dec_valid_i(cpu_i.dec_valid && !puc), .ir_i(cpu_i.dec_ir), .ext_i(cpu_i.dec_ext),
    .wdrst_o(wdrst), .illegal_o(illegal));

  // ---- approach-specific watchdog access and PC checks ------------------
  if (APPROACH == APP_ROM_COMPARE) begin : g_a1
    wdt_access_check #(.VALID_LOC(VALID_LOC)) u_chk (
      .clk, .rst_n, .clr_i(puc),
      .dwr_i(cpu_i.dwr && !puc), .daddr_i(cpu_i.daddr), .instr_pc_i(cpu_i.instr_pc),
      .stall_o(stall), .rom_rd_o(rom_b_rd), .rom_addr_o(rom_b_addr),
      .rom_rdata_i(rom_b_rdata), .wdt_wr_o(wdt_wr), .bad_access_o(bad_access));
  end else begin : g_no_a1
    assign stall      = 1'b0;
    assign rom_b_rd   = 1'b0;
    assign rom_b_addr = '0;
    assign bad_access = 1'b0;
    // Approach 2 has no watchdog in the address space; approach 3 keeps it.
    assign wdt_wr     = (APPROACH != APP_WDRST) && !puc && cpu_i.dwr &&
                        (cpu_i.daddr == WDT_ADDR);
  end

  if (ALIGNED) begin : g_a3
    pc_align_check #(.X(ALIGN_X)) u_align (
      .wr_i((cpu_i.jmp || cpu_i.pc_wr) && !puc), .data_i(pc_raw),
      .misaligned_o(misaligned));
  end else begin : g_no_a3
    assign misaligned = 1'b0;
  end

  // ---- watchdog ---------------------------------------------------------
  ss_wdt #(
    .CNT_W(WDT_CNT_W), .IVAL0(WDT_IVAL0), .IVAL1(WDT_IVAL1), .IVAL2(WDT_IVAL2),
    .IVAL3(WDT_IVAL3), .FIXED_MAX(APPROACH == APP_WDRST)
  ) u_wdt (
    .clk, .rst_n, .clr_i(puc), .tick_i(wdt_tick),
    .wr_i(wdt_wr), .wdata_i(cpu_i.dwdata), .wdrst_i(wdrst),
    .expired_o(wdt_expired), .overflow_o(wdt_overflow), .pw_err_o(wdt_pw_err),
    .cnt_o(wdt_cnt_o), .is_o(wdt_is));

  // ---- reset --------------------------------------------------------------
  always_comb begin
    src                = '0;
    src.wdt_expired    = wdt_expired && !puc;
    src.wdt_overflow   = wdt_overflow && !puc;
    src.wdt_password   = wdt_pw_err;
    src.wdt_bad_access = bad_access;
    src.illegal_instr  = illegal;
    src.pc_misaligned  = misaligned;
    src.cpu_fault      = cpu_i.fault;
  end

  reset_ctrl #(.RST_CYCLES(RST_CYCLES)) u_rst (
    .clk, .rst_n, .src_i(src), .rst_o(puc), .cause_o(cause_o));

  // A jump and a direct PC write cannot happen in the same cycle.
  a_one_pc_source: assert property (@(posedge clk) disable iff (puc)
    !(cpu_i.jmp && cpu_i.pc_wr));

  always_comb begin
    ctl_o.rst     = puc;
    ctl_o.stall   = stall;
    ctl_o.pc_load = (cpu_i.jmp || cpu_i.pc_wr) && !puc;
    ctl_o.pc_new  = pc_new;
    ctl_o.wdrst   = wdrst;
  end
endmodule
