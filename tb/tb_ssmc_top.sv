// tb_ssmc_top: end-to-end test of the three guarded micro controllers at
// their default sizes (16 KB ROM, 8 byte blocks, 32768-tick longest watchdog
// interval, watchdog ticking every cycle).
//
// Each guard serves a behavioural CPU (msp430_model) running a small main loop
// that clears the watchdog once per pass. The test first checks that normal
// operation never resets any CPU, then puts soft errors into the PCs and
// checks that each CPU comes back to its main loop, and how:
//  core 0 (register/ROM compare)
//   - PC into data fields holding a stray "MOV #5A08h,&0120h" followed by a
//     stray jump back to it: the write is refused, reset.
//   - PC into empty code (0000h): invalid instruction, reset.
//   - PC onto a jump-to-self: watchdog expires, reset.
//  core 1 (WDRST)
//   - PC onto a stray WDRST pattern (0001h 0001h in data fields): watchdog
//     cleared once, execution realigns on the next opcode, no reset.
//   - PC onto the second of those words: invalid instruction, reset.
//   - PC into a loop that writes WDTCTL: writes go nowhere, watchdog expires.
//  core 2 (8 byte alignment)
//   - PC into data fields holding "PUSH #4102h" then RETURN: return to an
//     unaligned address, reset.
//   - PC onto a stray jump inside a block: block-relative destination is a
//     block start (the main loop), no reset.
//   - stray write that shortens the interval without clearing the count:
//     count above the new threshold wraps, overflow reset.
//   - stray watchdog write with a wrong password: reset.
//   - stray "MOV #0288h,PC" (a RAM address): PC forced into ROM (4288h).
// Every reset must have exactly the expected cause; every mechanism must have
// happened at least once.
module tb_ssmc_top
  import ss_pkg::*;
;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, tick = 1;
  cpu_hooks_t cpu [3];
  cpu_ctl_t   ctl [3];
  rst_src_t   cause [3];
  logic [15:0] wcnt [3];
  logic        inj [3];
  logic [15:0] inj_pc [3];

  always #5 clk = ~clk;

  ssmc_top dut (.clk, .rst_n, .wdt_tick(tick), .cpu_i(cpu), .ctl_o(ctl),
                .cause_o(cause), .wdt_cnt_o(wcnt));

  for (genvar c = 0; c < 3; c++) begin : g_cpu
    msp430_model u_cpu (.clk, .inj_i(inj[c]), .inj_pc_i(inj_pc[c]), .ctl_i(ctl[c]),
                        .cpu_o(cpu[c]));
  end

  // ---- ROM images -------------------------------------------------------
  task automatic put(input int core, input logic [15:0] addr, input logic [15:0] w);
    case (core)
      0: dut.u_a1.u_rom.mem[addr[13:1]] = w;
      1: dut.u_a2.u_rom.mem[addr[13:1]] = w;
      default: dut.u_a3.u_rom.mem[addr[13:1]] = w;
    endcase
  endtask

  task automatic load_roms();
    // core 0: main loop, watchdog cleared by the one instruction at 4000h.
    put(0, 16'h4000, 16'h40B2); put(0, 16'h4002, 16'h5A08); put(0, 16'h4004, 16'h0120);
    put(0, 16'h4006, 16'h4303);
    put(0, 16'h4008, 16'h3FFB);                       // JMP 4000h
    put(0, 16'h7FFE, 16'h4000);                       // valid WDT access address
    // data fields hiding a WDT write at 4102h and a jump back to it at 4108h
    put(0, 16'h4100, 16'h4035); put(0, 16'h4102, 16'h40B2); put(0, 16'h4104, 16'h5A08);
    put(0, 16'h4106, 16'h0120); put(0, 16'h4108, 16'h3FFC); put(0, 16'h410A, 16'h4303);
    put(0, 16'h4200, 16'h3FFF);                       // JMP $
    // core 1: main loop with WDRST
    put(1, 16'h4000, 16'h0001); put(1, 16'h4002, 16'h0001);
    put(1, 16'h4004, 16'h4303);
    put(1, 16'h4006, 16'h3FFC);                       // JMP 4000h
    put(1, 16'h4100, 16'h40B2); put(1, 16'h4102, 16'h0001); put(1, 16'h4104, 16'h0001);
    put(1, 16'h4106, 16'h3F7C);                       // JMP 4000h
    put(1, 16'h4200, 16'h40B2); put(1, 16'h4202, 16'h5A08); put(1, 16'h4204, 16'h0120);
    put(1, 16'h4206, 16'h3FFC);                       // JMP 4200h
    // core 2: aligned main loop: WDT write, CALL at the end of its block
    put(2, 16'h4000, 16'h40B2); put(2, 16'h4002, 16'h5A08); put(2, 16'h4004, 16'h0120);
    put(2, 16'h4006, 16'h4303);
    put(2, 16'h4008, 16'h4303); put(2, 16'h400A, 16'h4303);
    put(2, 16'h400C, 16'h12B0); put(2, 16'h400E, 16'h4020);   // CALL #4020h
    put(2, 16'h4010, 16'h3FFE);                       // JMP -2 blocks: 4000h
    put(2, 16'h4020, 16'h4303); put(2, 16'h4022, 16'h4130);   // NOP; RET
    put(2, 16'h4100, 16'h40B2); put(2, 16'h4102, 16'h1230); put(2, 16'h4104, 16'h4102);
    put(2, 16'h4106, 16'h4130);
    put(2, 16'h4130, 16'h40B2); put(2, 16'h4132, 16'h3FDA); put(2, 16'h4134, 16'h4303);
    for (int a = 'h4200; a < 'h4280; a += 2) put(2, 16'(a), 16'h4303);
    put(2, 16'h4280, 16'h40B2); put(2, 16'h4282, 16'h5A03); put(2, 16'h4284, 16'h0120);
    put(2, 16'h4286, 16'h4303);
    put(2, 16'h4288, 16'h3C00);                       // JMP to own block
    put(2, 16'h4300, 16'h40B2); put(2, 16'h4302, 16'h1234); put(2, 16'h4304, 16'h0120);
    put(2, 16'h4400, 16'h4030); put(2, 16'h4402, 16'h0288);   // MOV #0288h,PC
  endtask

  // ---- monitors -----------------------------------------------------------
  int n_rst [3];
  int n_cause [3][7];
  int n_stall, n_grant, n_wdrst, n_ignored, n_blockjmp, n_call, n_restrict;
  int n_clear [3];
  logic [2:0] rst_q = '1;
  logic [2:0] armed = '0;   // a reset that started after power-on

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 3; c++) begin
      rst_q[c] <= ctl[c].rst;
      if (!rst_q[c] && ctl[c].rst) armed[c] <= 1'b1;
      if (armed[c] && rst_q[c] && !ctl[c].rst) begin
        armed[c] <= 1'b0;
        n_rst[c]++;
        for (int b = 0; b < 7; b++) if (cause[c][b]) n_cause[c][b]++;
      end
    end
    if (ctl[0].stall) n_stall++;
    if (dut.u_a1.wdt_wr) n_grant++;
    if (ctl[1].wdrst) n_wdrst++;
    if (!ctl[1].rst && cpu[1].dwr && cpu[1].daddr == WDT_ADDR) n_ignored++;
    if (!ctl[2].rst && cpu[2].jmp) n_blockjmp++;
    if (!ctl[2].rst && cpu[2].pc_wr && cpu[2].dwr) n_call++;
    if (!ctl[2].rst && ctl[2].pc_load && cpu[2].pc_wr_data[15:14] != 2'b01 && !cpu[2].jmp)
      n_restrict++;
    for (int c = 0; c < 3; c++)
      if (!ctl[c].rst && wcnt[c] == 0) n_clear[c]++;
  end

  // cause bit numbers: rst_src_t is packed MSB first
  localparam int C_EXP = 6, C_OVF = 5, C_PW = 4, C_BAD = 3, C_ILL = 2, C_MIS = 1;

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic inject(input int c, input logic [15:0] p);
    @(negedge clk);
    inj[c] = 1; inj_pc[c] = p;
    @(negedge clk);
    inj[c] = 0;
  endtask

  // Wait until core c has been reset n times in all, or a limit passes.
  task automatic wait_resets(input int c, input int n, input int limit, output int cycles);
    cycles = 0;
    while (n_rst[c] < n && cycles < limit) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cy, s, g;
    for (int c = 0; c < 3; c++) begin inj[c] = 0; inj_pc[c] = '0; n_rst[c] = 0; n_clear[c] = 0; end
    for (int c = 0; c < 3; c++) for (int b = 0; b < 7; b++) n_cause[c][b] = 0;
    {n_stall, n_grant, n_wdrst, n_ignored, n_blockjmp, n_call, n_restrict} = '0;
    #1 load_roms();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // normal operation: three longest watchdog intervals without a reset
    repeat (3 * 32768) @(negedge clk);
    for (int c = 0; c < 3; c++) begin
      chk($sformatf("core %0d runs without reset", c), n_rst[c] == 0);
      chk($sformatf("core %0d clears its watchdog", c), n_clear[c] > 1000);
      chk($sformatf("core %0d count stays low", c), wcnt[c] < 100);
    end
    chk("approach 1: every granted write stalled two cycles", n_stall >= 2 * n_grant && n_stall <= 2 * n_grant + 2 && n_grant > 0);
    chk("approach 2: WDRST executed", n_wdrst > 0);
    chk("approach 3: CALL/RET and block jumps run", n_call > 0 && n_blockjmp > 0);

    // ---- core 0: register/ROM compare ----
    inject(0, 16'h4102);
    wait_resets(0, 1, 1000, cy);
    chk("A1 stray WDT write refused quickly", n_rst[0] == 1 && n_cause[0][C_BAD] == 1 && cy < 30);
    g = n_grant;
    repeat (200) @(negedge clk);
    chk("A1 back in main loop", n_grant > g && n_rst[0] == 1);
    inject(0, 16'h5000);
    wait_resets(0, 2, 1000, cy);
    chk("A1 empty code is invalid", n_rst[0] == 2 && n_cause[0][C_ILL] == 1);
    inject(0, 16'h4200);
    wait_resets(0, 3, 40000, cy);
    chk("A1 jump-to-self ends by watchdog", n_rst[0] == 3 && n_cause[0][C_EXP] == 1);
    chk("A1 watchdog needs its full interval", cy > 32000 && cy < 32768 + 100);

    // ---- core 1: WDRST ----
    s = n_wdrst;
    inject(1, 16'h4102);
    repeat (100) @(negedge clk);
    chk("A2 stray WDRST realigned without reset", n_rst[1] == 0 && n_wdrst > s + 1);
    inject(1, 16'h4104);
    wait_resets(1, 1, 1000, cy);
    chk("A2 0001h without data word is invalid", n_rst[1] == 1 && n_cause[1][C_ILL] == 1);
    inject(1, 16'h4200);
    wait_resets(1, 2, 40000, cy);
    chk("A2 WDTCTL writes cannot hold off the watchdog",
        n_rst[1] == 2 && n_cause[1][C_EXP] == 1 && n_ignored > 1000);

    // ---- core 2: 8 byte alignment ----
    inject(2, 16'h4102);
    wait_resets(2, 1, 1000, cy);
    chk("A3 unaligned RETURN resets", n_rst[2] == 1 && n_cause[2][C_MIS] == 1);
    inject(2, 16'h4132);
    @(negedge clk);
    cy = 0;
    while (!(cpu[2].fetch && cpu[2].fetch_addr == 16'h4000) && cy < 100) begin
      @(negedge clk);
      cy++;
    end
    chk("A3 stray jump lands on a block start", cy < 20 && n_rst[2] == 1);
    inject(2, 16'h4200);
    wait_resets(2, 2, 70000, cy);
    chk("A3 count above threshold overflows", n_rst[2] == 2 && n_cause[2][C_OVF] == 1);
    chk("A3 overflow after the wrap, not the short interval", cy > 60000);
    inject(2, 16'h4300);
    wait_resets(2, 3, 1000, cy);
    chk("A3 bad password resets", n_rst[2] == 3 && n_cause[2][C_PW] == 1);
    s = n_restrict;
    inject(2, 16'h4400);
    repeat (20) @(negedge clk);
    chk("A3 RAM address forced into ROM", n_restrict == s + 1);
    wait_resets(2, 4, 40000, cy);
    chk("A3 loop at forced address ends by watchdog", n_rst[2] == 4 && n_cause[2][C_EXP] == 1);

    // ---- totals: no reset without its expected cause ----
    repeat (200) @(negedge clk);
    chk("core 0 reset count", n_rst[0] == 3);
    chk("core 1 reset count", n_rst[1] == 2);
    chk("core 2 reset count", n_rst[2] == 4);
    chk("no overflow/password/misalign on core 0",
        n_cause[0][C_OVF] + n_cause[0][C_PW] + n_cause[0][C_MIS] == 0);
    chk("no refused access on cores 1 and 2", n_cause[1][C_BAD] + n_cause[2][C_BAD] == 0);
    $display("mechanisms: stall=%0d grant=%0d wdrst=%0d ignored_wdtctl=%0d block_jumps=%0d calls=%0d pc_forced=%0d",
             n_stall, n_grant, n_wdrst, n_ignored, n_blockjmp, n_call, n_restrict);
    $display("resets: core0=%0d core1=%0d core2=%0d", n_rst[0], n_rst[1], n_rst[2]);
    chk("every mechanism happened", n_stall > 0 && n_grant > 0 && n_wdrst > 0 && n_ignored > 0 &&
        n_blockjmp > 0 && n_call > 0 && n_restrict > 0 &&
        n_cause[0][C_BAD] > 0 && n_cause[0][C_ILL] > 0 && n_cause[0][C_EXP] > 0 &&
        n_cause[2][C_MIS] > 0 && n_cause[2][C_OVF] > 0 && n_cause[2][C_PW] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
