// tb_reset_ctrl: checks the power-on reset, the RST_CYCLES-long CPU reset after
// a one-cycle request, its extension by a later request, and the recorded
// cause of every source.
module tb_reset_ctrl
  import ss_pkg::*;
;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rst;
  rst_src_t src = '0, cause;

  always #5 clk = ~clk;

  reset_ctrl dut (.clk, .rst_n, .src_i(src), .rst_o(rst), .cause_o(cause));

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Pulse a request for one cycle; return the reset length in cycles.
  task automatic pulse(input rst_src_t s, output int len);
    @(negedge clk);
    src = s;
    @(negedge clk);
    src = '0;
    len = 0;
    while (rst && len < 100) begin
      len++;
      @(negedge clk);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    rst_src_t s;
    #1 chk("reset during power-on", rst);
    repeat (2) @(negedge clk);
    rst_n = 1;
    n = 0;
    while (rst && n < 100) begin n++; @(negedge clk); end
    chk("power-on reset lasts 4 cycles", n == 4);
    chk("idle", !rst);
    for (int b = 0; b < $bits(rst_src_t); b++) begin
      s = rst_src_t'(1 << b);
      pulse(s, n);
      chk($sformatf("source %0d gives 4-cycle reset", b), n == 4);
      chk($sformatf("source %0d recorded", b), cause == s);
    end
    // a second request during a reset extends it and adds its cause
    @(negedge clk);
    src = '0; src.wdt_expired = 1;
    @(negedge clk);
    src = '0;
    @(negedge clk);
    src.illegal_instr = 1;
    @(negedge clk);
    src = '0;
    n = 0;
    while (rst && n < 100) begin n++; @(negedge clk); end
    chk("extended reset", n == 4);
    chk("both causes kept", cause.wdt_expired && cause.illegal_instr && !cause.cpu_fault);
    // next reset starts a new record
    s = '0; s.pc_misaligned = 1;
    pulse(s, n);
    chk("new record", cause == s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
