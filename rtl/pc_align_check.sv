// pc_align_check: 2^X byte alignment check on programmatic PC writes.
//
// With aligned code, every place a jump, CALL, RETURN or MOV ..., PC can
// legally go is the start of a 2^X byte block. Any programmatic PC write whose
// low X bits are not zero must therefore come from a corrupted value, and
// requests a CPU reset. Sequential PC increments are not checked.
// Combinational: the request is valid in the cycle of the write.
module pc_align_check #(
  parameter int unsigned X = 3  // log2 of the block size in bytes (8 byte blocks)
) (
  input  logic        wr_i,          // programmatic PC write this cycle
  input  logic [15:0] data_i,        // value written to the PC
  output logic        misaligned_o   // reset request
);
  always_comb misaligned_o = wr_i && (data_i[X-1:0] != '0);
endmodule
