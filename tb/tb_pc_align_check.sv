// tb_pc_align_check: a PC write is refused exactly when its value is not a
// multiple of 8; no request without a write.
module tb_pc_align_check;
  int checks = 0, failures = 0;
  logic        wr, mis;
  logic [15:0] d;

  pc_align_check dut (.wr_i(wr), .data_i(d), .misaligned_o(mis));

  task automatic check(input logic w, input logic [15:0] v);
    logic exp;
    wr = w;
    d  = v;
    #1;
    exp = w && (v % 8 != 0);
    checks++;
    if (mis !== exp) begin
      failures++;
      $display("FAIL wr=%b d=%h got %b exp %b", w, v, mis, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(1, 16'h4100);
    check(1, 16'h4108);
    check(1, 16'h4102);
    check(1, 16'h4104);
    check(1, 16'h4101);
    check(0, 16'h4102);
    for (int i = 0; i < 1000; i++) check(1'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
