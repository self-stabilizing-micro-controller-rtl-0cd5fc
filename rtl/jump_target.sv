// jump_target: destination of a relative jump.
//
// An MSP430 relative jump carries a 10 bit signed word offset. Without code
// alignment (ALIGNED = 0) the destination is the usual PC + 2*offset, where PC
// is the value the jump is relative to (its own address + 2).
//
// With 2^X byte code alignment (ALIGNED = 1) the offset counts whole blocks of
// 2^X bytes instead of words: the PC is first aligned by clearing its low X
// bits and then offset * 2^X is added ("000 appended" for 8 byte blocks). Every
// destination is thus a block start, and the reach grows by 2^(X-1) (four
// times for 8 byte blocks), making up for the distance added by the padding
// NOPs. Both follow the design; treating the offset as two's complement
// (-512..+511 blocks) is this design's reading of its range. Combinational.
module jump_target #(
  parameter bit          ALIGNED = 1'b1,  // 1: offset counts 2^X byte blocks
  parameter int unsigned X       = 3,     // log2 of the block size in bytes
  parameter int unsigned OFF_W   = 10     // width of the jump offset field
) (
  input  logic [15:0]      pc_i,      // PC the jump is relative to
  input  logic [OFF_W-1:0] off_i,     // signed offset field
  output logic [15:0]      target_o   // jump destination
);
  localparam logic [15:0] BLK_MASK = 16'((32'd1 << X) - 32'd1);

  logic [15:0] off_ext;
  always_comb begin
    off_ext = 16'($signed(off_i));
    if (ALIGNED) target_o = (pc_i & ~BLK_MASK) + (off_ext << X);
    else         target_o = pc_i + (off_ext << 1);
  end
endmodule
