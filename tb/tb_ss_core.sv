// tb_ss_core: drives the CPU hooks of one core of each approach directly, with
// short watchdog intervals (64/32/16/8 ticks), and checks cycle by cycle:
// fetch through the restricted address with one-cycle latency, jump
// destinations (word-relative vs block-relative), PC values forced into ROM,
// the alignment check, the approach-1 stall/grant/refuse sequence against the
// ROM's last word, WDRST versus ignored WDTCTL writes in approach 2, and reset
// length and cause for each detector.
module tb_ss_core
  import ss_pkg::*;
;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, tick = 0;
  cpu_hooks_t h [3];
  cpu_ctl_t   c [3];
  rst_src_t   cause [3];
  logic [15:0] cnt [3];

  always #5 clk = ~clk;

  ss_core #(.APPROACH(APP_ROM_COMPARE), .WDT_IVAL0(64), .WDT_IVAL1(32), .WDT_IVAL2(16),
            .WDT_IVAL3(8)) u1 (.clk, .rst_n, .wdt_tick(tick), .cpu_i(h[0]), .ctl_o(c[0]),
            .cause_o(cause[0]), .wdt_cnt_o(cnt[0]));
  ss_core #(.APPROACH(APP_WDRST), .WDT_IVAL0(64), .WDT_IVAL1(32), .WDT_IVAL2(16),
            .WDT_IVAL3(8)) u2 (.clk, .rst_n, .wdt_tick(tick), .cpu_i(h[1]), .ctl_o(c[1]),
            .cause_o(cause[1]), .wdt_cnt_o(cnt[1]));
  ss_core #(.APPROACH(APP_ALIGN), .WDT_IVAL0(64), .WDT_IVAL1(32), .WDT_IVAL2(16),
            .WDT_IVAL3(8)) u3 (.clk, .rst_n, .wdt_tick(tick), .cpu_i(h[2]), .ctl_o(c[2]),
            .cause_o(cause[2]), .wdt_cnt_o(cnt[2]));

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic idle();
    for (int i = 0; i < 3; i++) h[i] = '0;
  endtask

  // Count how long core i stays in reset from now on.
  task automatic reset_len(input int i, output int n);
    n = 0;
    while (c[i].rst && n < 100) begin
      @(negedge clk);
      n++;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    idle();
    #1;
    u1.u_rom.mem[13'h1FFF] = 16'h4126;            // valid WDT address (last word)
    u1.u_rom.mem[13'h0093] = 16'h40B2;            // word at 4126h
    u3.u_rom.mem[13'h0000] = 16'hABCD;            // word at 4000h
    @(negedge clk);
    rst_n = 1;
    reset_len(0, n);
    chk("power-on reset 4 cycles", n == 3 || n == 4);
    @(negedge clk);

    // fetch: RAM address 0000h is fetched from ROM 4000h, one cycle later
    h[2].fetch = 1; h[2].fetch_addr = 16'h0000;
    @(negedge clk);
    h[2] = '0;
    chk("fetch through restricted address", c[2].fetch_data == 16'hABCD);
    h[0].fetch = 1; h[0].fetch_addr = 16'h4126;
    @(negedge clk);
    h[0] = '0;
    chk("fetch core 0", c[0].fetch_data == 16'h40B2);

    // jumps: word-relative in cores 0/1, block-relative in core 2
    for (int i = 0; i < 3; i++) begin
      h[i].jmp = 1; h[i].jmp_pc = 16'h410C; h[i].jmp_off = 10'h3FF;  // -1
    end
    #1;
    chk("word jump core 0", c[0].pc_load && c[0].pc_new == 16'h410A);
    chk("word jump core 1", c[1].pc_load && c[1].pc_new == 16'h410A);
    chk("block jump core 2", c[2].pc_load && c[2].pc_new == 16'h4100);
    for (int i = 0; i < 3; i++) h[i].jmp_off = 10'd3;
    #1;
    chk("block jump forward", c[2].pc_new == 16'h4120 && c[0].pc_new == 16'h4112);
    @(negedge clk);
    idle();
    #1 chk("no reset from jumps", !c[0].rst && !c[1].rst && !c[2].rst);

    // PC write to RAM address: forced into ROM, aligned value accepted in core 2
    for (int i = 0; i < 3; i++) begin h[i].pc_wr = 1; h[i].pc_wr_data = 16'h0208; end
    #1;
    chk("PC forced into ROM", c[0].pc_new == 16'h4208 && c[2].pc_new == 16'h4208);
    @(negedge clk);
    idle();
    #1 chk("aligned PC write accepted", !c[2].rst);
    // unaligned PC write: only core 2 resets
    for (int i = 0; i < 3; i++) begin h[i].pc_wr = 1; h[i].pc_wr_data = 16'h4102; end
    @(negedge clk);
    idle();
    #1 chk("unaligned PC write resets core 2 only", c[2].rst && !c[0].rst && !c[1].rst);
    reset_len(2, n);
    chk("reset 4 cycles", n == 4);
    chk("cause misaligned", cause[2] == rst_src_t'(7'b0000010));

    // approach 1: valid access
    @(negedge clk);
    h[0].dwr = 1; h[0].daddr = WDT_ADDR; h[0].dwdata = 16'h5A0B; h[0].instr_pc = 16'h4126;
    n = 0;
    #1;
    while (c[0].stall && n < 10) begin @(negedge clk); #1; n++; end
    chk("approach 1 stalls 2 cycles", n == 2);
    @(negedge clk);
    idle();
    #1 chk("approach 1 grant sets interval", u1.wdt_is == 2'b11 && !c[0].rst);
    // approach 1: stray access
    h[0].dwr = 1; h[0].daddr = WDT_ADDR; h[0].dwdata = 16'h5A08; h[0].instr_pc = 16'h4128;
    repeat (3) @(negedge clk);
    idle();
    #1 chk("approach 1 refuses stray write", c[0].rst && cause[0].wdt_bad_access);
    reset_len(0, n);

    // approach 2: WDTCTL write does nothing, WDRST clears
    tick = 1;
    repeat (10) @(negedge clk);
    h[1].dwr = 1; h[1].daddr = WDT_ADDR; h[1].dwdata = 16'h5A0B;
    @(negedge clk);
    idle();
    chk("approach 2 ignores WDTCTL write", cnt[1] > 10 && u2.wdt_is == 2'b00 && !c[1].rst);
    h[1].dec_valid = 1; h[1].dec_ir = 16'h0001; h[1].dec_ext = 16'h0001;
    #1 chk("WDRST decoded", c[1].wdrst);
    @(negedge clk);
    idle();
    chk("WDRST clears", cnt[1] == 0 && !c[1].rst);
    h[0].dec_valid = 1; h[0].dec_ir = 16'h0001; h[0].dec_ext = 16'h0001;
    @(negedge clk);
    idle();
    #1 chk("0001h 0001h invalid without WDRST", c[0].rst && cause[0].illegal_instr && !c[0].wdrst);
    reset_len(0, n);
    // approach 3 WDT write path is direct
    h[2].dwr = 1; h[2].daddr = WDT_ADDR; h[2].dwdata = 16'h5A08;
    #1 chk("approach 3 no stall", !c[2].stall);
    @(negedge clk);
    idle();
    chk("approach 3 WDT cleared", cnt[2] == 0);

    // watchdog expiry of core 2 after 64 ticks, the others cleared meanwhile
    n = 0;
    while (!c[2].rst && n < 200) begin
      h[1].dec_valid = (n % 20 == 0); h[1].dec_ir = 16'h0001; h[1].dec_ext = 16'h0001;
      @(negedge clk);
      n++;
    end
    idle();
    chk("core 2 watchdog expiry after 64 ticks", n == 64 && cause[2].wdt_expired);
    chk("core 1 kept alive by WDRST", !c[1].rst);
    reset_len(2, n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
