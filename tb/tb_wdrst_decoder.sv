// tb_wdrst_decoder: checks WDRST recognition (0001h, 0001h) and invalid-opcode
// detection below 1000h, with WDRST enabled and disabled, including both
// outcomes of a stray PC landing in a WDRST pattern.
module tb_wdrst_decoder;
  int checks = 0, failures = 0;
  logic        v;
  logic [15:0] ir, ext;
  logic        w1, i1, w0, i0;

  wdrst_decoder #(.WDRST_EN(1'b1)) dut_en  (.dec_valid_i(v), .ir_i(ir), .ext_i(ext),
                                            .wdrst_o(w1), .illegal_o(i1));
  wdrst_decoder #(.WDRST_EN(1'b0)) dut_dis (.dec_valid_i(v), .ir_i(ir), .ext_i(ext),
                                            .wdrst_o(w0), .illegal_o(i0));

  task automatic check(input logic val, input logic [15:0] a, input logic [15:0] b);
    logic ew, ei;
    v = val; ir = a; ext = b;
    #1;
    ew = val && a == 16'h0001 && b == 16'h0001;
    ei = val && a < 16'h1000 && !ew;
    checks += 4;
    if (w1 !== ew) begin failures++; $display("FAIL en wdrst %h %h", a, b); end
    if (i1 !== ei) begin failures++; $display("FAIL en illegal %h %h", a, b); end
    if (w0 !== 1'b0) begin failures++; $display("FAIL dis wdrst %h %h", a, b); end
    if (i0 !== (val && a < 16'h1000)) begin failures++; $display("FAIL dis illegal %h %h", a, b); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(1, 16'h0001, 16'h0001);  // real or stray WDRST: clears the watchdog once
    check(1, 16'h0001, 16'h4303);  // stray PC on the data word: invalid
    check(1, 16'h0000, 16'h0000);  // empty code space
    check(1, 16'h0FFF, 16'h0001);
    check(1, 16'h1000, 16'h0001);  // lowest real opcode word
    check(1, 16'h40B2, 16'h5A08);
    check(0, 16'h0001, 16'h0001);
    for (int i = 0; i < 2000; i++)
      check(1'b1, ($urandom_range(0, 3) == 0) ? 16'($urandom_range(0, 2)) : 16'($urandom),
            ($urandom_range(0, 1) == 0) ? 16'h0001 : 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
