// tb_align_sizes: the alignment check and block-relative jumps at the three
// block sizes whose code overhead is compared for the design (8, 16 and 32
// bytes, X = 3, 4, 5). For each size: a PC write passes exactly when it is a
// multiple of the block size, and a jump lands on aligned PC + offset * block
// size, so its destination always passes the check.
module tb_align_sizes;
  int checks = 0, failures = 0;
  logic [15:0] pc, d;
  logic [9:0]  off;
  logic        wr;
  logic [15:0] t [3];
  logic        mis [3];
  logic        tmis [3];

  for (genvar k = 0; k < 3; k++) begin : g_x
    jump_target    #(.ALIGNED(1'b1), .X(k + 3)) u_j (.pc_i(pc), .off_i(off), .target_o(t[k]));
    pc_align_check #(.X(k + 3)) u_c  (.wr_i(wr), .data_i(d), .misaligned_o(mis[k]));
    pc_align_check #(.X(k + 3)) u_ct (.wr_i(1'b1), .data_i(t[k]), .misaligned_o(tmis[k]));
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      automatic int o;
      pc  = 16'($urandom);
      o   = int'($urandom_range(0, 1023)) - 512;
      off = 10'(o);
      d   = 16'($urandom) & (($urandom_range(0, 1) == 0) ? 16'hFFE0 : 16'hFFFF);
      wr  = 1'b1;
      #1;
      for (int k = 0; k < 3; k++) begin
        automatic int a = 8 << k;
        automatic int exp_t = ((int'(pc) / a) * a + o * a) & 32'hFFFF;
        checks += 3;
        if (t[k] !== 16'(exp_t)) begin
          failures++;
          $display("FAIL A=%0d pc=%h off=%0d got %h exp %h", a, pc, o, t[k], 16'(exp_t));
        end
        if (mis[k] !== (int'(d) % a != 0)) begin
          failures++;
          $display("FAIL A=%0d check of %h", a, d);
        end
        if (tmis[k] !== 1'b0) begin
          failures++;
          $display("FAIL A=%0d jump destination %h not aligned", a, t[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
