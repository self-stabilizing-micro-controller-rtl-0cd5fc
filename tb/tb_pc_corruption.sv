// tb_pc_corruption: randomized soft-error campaign on the three guarded
// micro controllers at their default sizes. Each core runs the same programs
// as in tb_ssmc_top (a main loop plus data fields that hide watchdog clears,
// WDRST patterns, PUSH/RETURN pairs, stray jumps and endless loops). Again and
// again the PC of every core is set to a random even address in the
// program (half of the time exactly onto one of the programmed words, so onto
// the hidden patterns), the RAM stack (0200h-03FEh) or anywhere in the
// address space. The claim under test: whatever the PC value, each core
// executes its intended watchdog clear at the top of the main loop (4000h)
// again within a bounded time. The bound allowed here is 70000 cycles: one
// longest watchdog interval (32768 ticks), or a count that must wrap past
// FFFFh after a stray interval change (approach 3 program), plus margin.
// Counts how many corruptions ended by each kind of reset or by realignment
// without reset, and fails if any core needs longer than the bound.
module tb_pc_corruption
  import ss_pkg::*;
;
  localparam int ROUNDS = 200;
  localparam int BOUND  = 70000;

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

  // The intended watchdog clear of each core: the instruction at 4000h.
  function automatic logic main_clear(input int c);
    if (ctl[c].rst || ctl[c].stall || cpu[c].instr_pc != 16'h4000 || !cpu[c].dec_valid) return 1'b0;
    if (c == 1) return ctl[c].wdrst;
    return cpu[c].dwr && cpu[c].daddr == WDT_ADDR;
  endfunction

  int n_clear [3];
  int n_reset [3];
  int by_cause [3][7];
  int n_realign [3];
  int worst [3];
  logic [2:0] rst_q = '0;

  always @(posedge clk) if (rst_n)
    for (int c = 0; c < 3; c++) begin
      rst_q[c] <= ctl[c].rst;
      if (main_clear(c)) n_clear[c]++;
      if (!rst_q[c] && ctl[c].rst) n_reset[c]++;
    end

  // Addresses of the programmed (non-empty) words of each core.
  logic [15:0] used [3][$];

  function automatic logic [15:0] rom_word(input int c, input int i);
    case (c)
      0: return dut.u_a1.u_rom.mem[i];
      1: return dut.u_a2.u_rom.mem[i];
      default: return dut.u_a3.u_rom.mem[i];
    endcase
  endfunction

  task automatic campaign(input int c);
    for (int r = 0; r < ROUNDS; r++) begin
      int cl, rs, cy;
      logic [15:0] p;
      case ($urandom_range(0, 5))
        0, 1, 2: p = used[c][$urandom_range(0, used[c].size() - 1)];
        3:    p = 16'h4000 + 16'($urandom_range(0, 'h240) * 2);
        4:    p = 16'h0200 + 16'($urandom_range(0, 'hFF) * 2);
        default: p = 16'($urandom) & 16'hFFFE;
      endcase
      // start from a clean pass of the main loop
      cl = n_clear[c];
      while (n_clear[c] == cl) @(negedge clk);
      @(negedge clk);
      inj[c] = 1; inj_pc[c] = p;
      @(negedge clk);
      inj[c] = 0;
      cl = n_clear[c];
      rs = n_reset[c];
      cy = 0;
      while (n_clear[c] == cl && cy < BOUND) begin
        @(negedge clk);
        cy++;
      end
      checks++;
      if (cy >= BOUND) begin
        failures++;
        $display("FAIL core %0d: PC=%h not back in the main loop after %0d cycles", c, p, cy);
      end
      if (cy > worst[c]) worst[c] = cy;
      if (n_reset[c] == rs) n_realign[c]++;
      else for (int b = 0; b < 7; b++) if (cause[c][b]) by_cause[c][b]++;
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 3; c++) begin
      inj[c] = 0; inj_pc[c] = '0; n_clear[c] = 0; n_reset[c] = 0; n_realign[c] = 0; worst[c] = 0;
      for (int b = 0; b < 7; b++) by_cause[c][b] = 0;
    end
    #1 load_roms();
    for (int c = 0; c < 3; c++)
      for (int i = 0; i < 8192; i++)
        if (rom_word(c, i) != 16'h0000 && i != 8191) used[c].push_back(16'h4000 + 16'(i * 2));
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      campaign(0);
      campaign(1);
      campaign(2);
    join
    for (int c = 0; c < 3; c++) begin
      // rst_src_t bit order, MSB first: expired, overflow, password, refused,
      // invalid, misaligned, cpu fault
      $display("core %0d: %0d corruptions, %0d realigned without reset, resets by cause exp/ovf/pw/refused/invalid/misaligned = %0d/%0d/%0d/%0d/%0d/%0d, worst recovery %0d cycles",
               c, ROUNDS, n_realign[c], by_cause[c][6], by_cause[c][5], by_cause[c][4],
               by_cause[c][3], by_cause[c][2], by_cause[c][1], worst[c]);
      checks++;
      if (worst[c] >= BOUND) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
