// tb_ss_wdt: checks the watchdog at its default intervals: ticks until expiry
// for each interval select, clearing by CNTCL, holding without ticks, the
// password check, the overflow of a count pushed above its threshold, and the
// fixed-interval variant cleared only by WDRST.
module tb_ss_wdt;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, tick = 0, wr = 0, wdrst = 0;
  logic [15:0] wdata = 0;
  logic        exp_a, ovf_a, pw_a, exp_f, ovf_f, pw_f;
  logic [15:0] cnt_a, cnt_f;
  logic [1:0]  is_a, is_f;

  always #5 clk = ~clk;

  ss_wdt dut (.clk, .rst_n, .clr_i(clr), .tick_i(tick), .wr_i(wr), .wdata_i(wdata),
              .wdrst_i(1'b0), .expired_o(exp_a), .overflow_o(ovf_a), .pw_err_o(pw_a),
              .cnt_o(cnt_a), .is_o(is_a));
  ss_wdt #(.FIXED_MAX(1'b1)) dut_f (.clk, .rst_n, .clr_i(clr), .tick_i(tick), .wr_i(wr),
              .wdata_i(wdata), .wdrst_i(wdrst), .expired_o(exp_f), .overflow_o(ovf_f),
              .pw_err_o(pw_f), .cnt_o(cnt_f), .is_o(is_f));

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cnt=%0d is=%0d)", what, cnt_a, is_a);
    end
  endtask

  task automatic write(input logic [15:0] v);
    @(negedge clk);
    wr = 1; wdata = v;
    @(negedge clk);
    wr = 0;
  endtask

  task automatic do_clr();
    @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0;
  endtask

  // Tick every cycle; return the number of ticks up to and including the one
  // that raised a reset request of the first instance.
  task automatic ticks_to_reset(output int n, output logic was_ovf);
    n = 0;
    was_ovf = 0;
    tick = 1;
    forever begin
      #1;
      n++;
      if (exp_a || ovf_a) begin
        was_ovf = ovf_a;
        break;
      end
      if (n > 70000) break;
      @(negedge clk);
    end
    @(negedge clk);
    tick = 0;
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic o;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk("reset count", cnt_a == 0 && is_a == 2'b00);
    // holds without ticks
    repeat (5) @(negedge clk);
    chk("no tick holds", cnt_a == 0);
    // default interval after reset: 32768 ticks
    ticks_to_reset(n, o);
    chk("IS=00 expires after 32768 ticks", n == 32768 && !o);
    // clearing with each interval select
    do_clr();
    write(16'h5A0B);
    ticks_to_reset(n, o);
    chk("IS=11 expires after 64 ticks", n == 64 && !o);
    do_clr();
    write(16'h5A0A);
    ticks_to_reset(n, o);
    chk("IS=10 expires after 512 ticks", n == 512 && !o);
    do_clr();
    write(16'h5A09);
    ticks_to_reset(n, o);
    chk("IS=01 expires after 8192 ticks", n == 8192 && !o);
    // a CNTCL write in time keeps it from expiring
    do_clr();
    write(16'h5A0B);
    tick = 1;
    repeat (60) @(negedge clk);
    tick = 0;
    chk("count advanced", cnt_a == 60);
    write(16'h5A0B);
    chk("CNTCL cleared", cnt_a == 0);
    // wrong password
    @(negedge clk);
    wr = 1; wdata = 16'h690B;
    #1 chk("password error flagged", pw_a && pw_f);
    @(negedge clk);
    wr = 0;
    chk("bad write ignored", cnt_a == 0 && is_a == 2'b11);
    // count above threshold: runs to the top and wraps
    do_clr();
    tick = 1;
    repeat (1000) @(negedge clk);
    tick = 0;
    write(16'h5A03);               // IS=11 (64) without CNTCL, count stays 1000
    chk("interval changed, count kept", is_a == 2'b11 && cnt_a == 1000);
    ticks_to_reset(n, o);
    chk("overflow after wrap", o && n == 65536 - 1000);
    // fixed-interval variant: writes cannot shorten, WDRST clears
    do_clr();
    write(16'h5A0B);
    chk("fixed interval ignores IS", is_f == 2'b00 && cnt_f == 0);
    tick = 1;
    repeat (100) @(negedge clk);
    tick = 0;
    @(negedge clk);
    wdrst = 1;
    @(negedge clk);
    wdrst = 0;
    chk("WDRST clears", cnt_f == 0 && is_f == 2'b00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
