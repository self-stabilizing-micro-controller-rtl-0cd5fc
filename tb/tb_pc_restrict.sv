// tb_pc_restrict: checks that every address is forced into the 4000h-7FFFh
// ROM window with its low 14 bits kept, for directed and random addresses.
module tb_pc_restrict;
  int checks = 0, failures = 0;
  logic [15:0] a, y;

  pc_restrict dut (.addr_i(a), .addr_o(y));

  task automatic check(input logic [15:0] addr);
    logic [15:0] exp;
    a = addr;
    #1;
    exp = 16'h4000 + (addr % 16'h4000);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL addr=%h got %h exp %h", addr, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h4100);   // inside ROM: unchanged
    check(16'h7FFE);
    check(16'h0120);   // RAM / peripheral address: pulled into ROM
    check(16'h8000);
    check(16'hFFFE);
    check(16'h0000);
    for (int i = 0; i < 1000; i++) check(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
