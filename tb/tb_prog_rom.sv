// tb_prog_rom: a small ROM image sets words 0 and 1 and the last word. Checks
// both read ports, their one-cycle latency, that data holds without a read,
// and that unprogrammed words read 0000h.
module tb_prog_rom;
  int checks = 0, failures = 0;
  logic clk = 0, ard = 0, brd = 0;
  logic [13:0] aaddr = 0, baddr = 0;
  logic [15:0] ad, bd;

  always #5 clk = ~clk;

  prog_rom #(.INIT_FILE("tb/rom_test.hex")) dut (.clk, .a_rd_i(ard), .a_addr_i(aaddr),
    .a_rdata_o(ad), .b_rd_i(brd), .b_addr_i(baddr), .b_rdata_o(bd));

  function automatic logic [15:0] image(input logic [13:0] a);
    case (a[13:1])
      13'd0:    return 16'h4031;
      13'd1:    return 16'h7FFE;
      13'h1fff: return 16'h4126;
      default:  return 16'h0000;
    endcase
  endfunction

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    ard = 1; aaddr = 14'h0000; brd = 1; baddr = 14'h3FFE;
    @(negedge clk);
    chk("port A word 0", ad == 16'h4031);
    chk("port B last word", bd == 16'h4126);
    aaddr = 14'h0002; brd = 0; baddr = 14'h0000;
    @(negedge clk);
    chk("port A word 1", ad == 16'h7FFE);
    chk("port B holds without read", bd == 16'h4126);
    aaddr = 14'h0003;   // odd byte address: same word
    #1 chk("latency: old data before the edge", ad == 16'h7FFE);
    @(negedge clk);
    chk("byte bit 0 ignored", ad == 16'h7FFE);
    for (int i = 0; i < 500; i++) begin
      automatic logic [13:0] x = 14'($urandom);
      automatic logic [13:0] y = 14'($urandom);
      if (i % 50 == 0) x = 14'h3FFE;
      aaddr = x; baddr = y; ard = 1; brd = 1;
      @(negedge clk);
      chk("random A", ad == image(x));
      chk("random B", bd == image(y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
