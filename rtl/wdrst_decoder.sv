// wdrst_decoder: decoding of the opcode range below the MSP430 instruction set.
//
// No MSP430 opcode word lies below 1000h (the lowest opcode prefix is 000100).
// The guard uses this range in two ways:
//  * WDRST (only if WDRST_EN): the 32 bit instruction 0001h followed by the
//    data word 0001h clears the relocated watchdog. Because both words are
//    0001h and no other instruction can hold 0001h in its opcode word, a PC
//    that lands on a stray WDRST pattern either clears the watchdog once and
//    then lands on a real opcode, or executes 0001h followed by something
//    other than 0001h.
//  * Every other opcode word below 1000h, including a 0001h whose data word is
//    not 0001h and the 0000h of empty code space, is an invalid instruction and
//    requests a CPU reset.
// Combinational; dec_valid qualifies both outputs.
module wdrst_decoder
  import ss_pkg::*;
#(
  parameter bit WDRST_EN = 1'b1  // 1: approach-2 core that implements WDRST
) (
  input  logic        dec_valid_i,  // an instruction is being decoded
  input  logic [15:0] ir_i,         // its opcode word
  input  logic [15:0] ext_i,        // the next word in memory
  output logic        wdrst_o,      // execute WDRST
  output logic        illegal_o     // invalid instruction: reset request
);
  logic is_wdrst;
  always_comb begin
    is_wdrst  = WDRST_EN && (ir_i == WDRST_CODE) && (ext_i == WDRST_CODE);
    wdrst_o   = dec_valid_i && is_wdrst;
    illegal_o = dec_valid_i && (ir_i < LOWEST_OPCODE) && !is_wdrst;
  end
endmodule
