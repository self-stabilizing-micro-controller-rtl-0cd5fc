// tb_jump_target: checks block-relative jumps (8 byte blocks, aligned PC plus
// offset * 8) and plain word-relative jumps (PC + 2 * offset) against integer
// arithmetic, including the extremes of the 10 bit offset.
module tb_jump_target;
  int checks = 0, failures = 0;
  logic [15:0] pc, ya, yw;
  logic [9:0]  off;

  jump_target #(.ALIGNED(1'b1)) dut_a (.pc_i(pc), .off_i(off), .target_o(ya));
  jump_target #(.ALIGNED(1'b0)) dut_w (.pc_i(pc), .off_i(off), .target_o(yw));

  task automatic check(input logic [15:0] p, input int o);
    int ea, ew, base;
    pc  = p;
    off = 10'(o);
    #1;
    base = int'(p) - (int'(p) % 8);
    ea = (base + o * 8) & 32'hFFFF;
    ew = (int'(p) + o * 2) & 32'hFFFF;
    checks += 2;
    if (ya !== 16'(ea)) begin
      failures++;
      $display("FAIL aligned pc=%h off=%0d got %h exp %h", p, o, ya, 16'(ea));
    end
    if (yw !== 16'(ew)) begin
      failures++;
      $display("FAIL word pc=%h off=%0d got %h exp %h", p, o, yw, 16'(ew));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h410A, -1);    // into the previous block: 4100h
    check(16'h4108, 0);
    check(16'h4106, 2);
    check(16'h5000, 511);   // furthest forward
    check(16'h5000, -512);  // furthest backward
    for (int i = 0; i < 2000; i++)
      check(16'($urandom), int'($urandom_range(0, 1023)) - 512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
