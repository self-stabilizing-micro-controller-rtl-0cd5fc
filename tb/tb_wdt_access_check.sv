// tb_wdt_access_check: a behavioural one-cycle ROM holds the valid address in
// its last word. Checks that a WDTCTL write from that address is granted after
// exactly two stall cycles, that a write from any other address is refused
// with a reset request, that the comparison register is reloaded from ROM on
// every check (a changed ROM word takes effect at once), that other writes
// pass without a stall, that a write dropped during the check is refused, and
// that the CPU reset aborts a check.
module tb_wdt_access_check;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, dwr = 0;
  logic [15:0] daddr = 0, ipc = 0;
  logic stall, rom_rd, wdt_wr, bad;
  logic [15:0] rom_addr, rom_rdata, valid_word;

  always #5 clk = ~clk;

  wdt_access_check dut (.clk, .rst_n, .clr_i(clr), .dwr_i(dwr), .daddr_i(daddr),
    .instr_pc_i(ipc), .stall_o(stall), .rom_rd_o(rom_rd), .rom_addr_o(rom_addr),
    .rom_rdata_i(rom_rdata), .wdt_wr_o(wdt_wr), .bad_access_o(bad));

  // ROM model: only the last word of the 4000h-7FFFh window is programmed.
  always_ff @(posedge clk)
    if (rom_rd) rom_rdata <= (rom_addr == 16'h7FFE) ? valid_word : 16'h0000;

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Present a write, hold it while stalled; report cycles and outcome.
  task automatic access(input logic [15:0] addr, input logic [15:0] pc,
                        output int stalls, output logic granted, output logic refused);
    @(negedge clk);
    dwr = 1; daddr = addr; ipc = pc;
    stalls = 0; granted = 0; refused = 0;
    forever begin
      #1;
      granted |= wdt_wr;
      refused |= bad;
      if (!stall) break;
      stalls++;
      if (stalls > 10) break;
      @(negedge clk);
    end
    @(negedge clk);
    dwr = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    logic g, r;
    valid_word = 16'h4126;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // intended access from the main loop
    access(16'h0120, 16'h4126, s, g, r);
    chk("valid access granted", g && !r);
    chk("two stall cycles", s == 2);
    chk("reads the last ROM word", rom_addr == 16'h7FFE);
    // stray accesses from anywhere else
    access(16'h0120, 16'h4102, s, g, r);
    chk("stray access refused", !g && r && s == 2);
    access(16'h0120, 16'h4127, s, g, r);
    chk("one-bit-off address refused", !g && r);
    // other addresses pass unchecked
    access(16'h0200, 16'h4102, s, g, r);
    chk("RAM write not stalled", s == 0 && !g && !r);
    // comparison register reloaded every time
    valid_word = 16'h4300;
    access(16'h0120, 16'h4126, s, g, r);
    chk("old address refused after ROM change", !g && r);
    access(16'h0120, 16'h4300, s, g, r);
    chk("new address granted", g && !r);
    // write abandoned during the check: refused
    @(negedge clk);
    dwr = 1; daddr = 16'h0120; ipc = 16'h4300;
    @(negedge clk);
    dwr = 0;
    @(negedge clk);
    #1 chk("abandoned write refused", bad && !wdt_wr);
    @(negedge clk);
    // CPU reset in the middle of a check
    @(negedge clk);
    dwr = 1; daddr = 16'h0120; ipc = 16'h4102;
    @(negedge clk);
    clr = 1; dwr = 0;
    @(negedge clk);
    clr = 0;
    #1 chk("reset aborts check", !stall && !wdt_wr && !bad);
    for (int i = 0; i < 200; i++) begin
      automatic logic [15:0] pc = ($urandom_range(0, 1) == 0) ? 16'h4300 : 16'h4000 + 16'($urandom_range(0, 8191) * 2);
      access(16'h0120, pc, s, g, r);
      chk("random access", s == 2 && g == (pc == 16'h4300) && r == (pc != 16'h4300));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
