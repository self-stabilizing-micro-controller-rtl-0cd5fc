// msp430_model: behavioural model of the CPU side of a guarded micro
// controller, for testbenches only. Not synthesizable and not an MSP430: it
// executes just enough of the instruction set to replay corrupted-PC
// scenarios through the guard's hook interface (ss_pkg::cpu_hooks_t).
//
// Every instruction takes five cycles: three fetches (opcode word and the two
// words after it, each read one cycle after its request) and one execute
// cycle, repeated while the guard stalls. Decoded words:
//   4303h          NOP (MOV R3,R3)           1 word
//   40B2h imm abs  MOV #imm,&abs             3 words, data write
//   4030h imm      MOV #imm,PC               2 words, PC write
//   1230h imm      PUSH #imm                 2 words, stack write
//   12B0h imm      CALL #imm                 2 words, stack write + PC write
//   4130h          RET (MOV @SP+,PC)         1 word, PC write
//   3C00h-3FFFh    JMP with 10 bit offset    1 word, jump
//   0001h 0001h    WDRST where the guard has it, 2 words
// Any other word of 1000h and above runs as a one-word no-op; words below
// 1000h are left to the guard, which resets the CPU. Jumps and PC writes load
// the value the guard returns (pc_new). The guard's reset puts the PC at
// RESET_PC and the stack pointer at 0400h. inj_i moves the PC to inj_pc_i at
// once, standing in for a soft error in the PC.
module msp430_model
  import ss_pkg::*;
#(
  parameter logic [15:0] RESET_PC = 16'h4000
) (
  input  logic        clk,
  input  logic        inj_i,      // PC corruption
  input  logic [15:0] inj_pc_i,   // corrupted PC value
  input  cpu_ctl_t    ctl_i,
  output cpu_hooks_t  cpu_o
);
  typedef enum logic [2:0] {S_F0, S_F1, S_F2, S_F3, S_EX} state_e;

  state_e      state = S_F0;
  logic [15:0] pc = RESET_PC, sp = 16'h0400;
  logic [15:0] ir = 16'h4303, ext1 = 16'h0, ext2 = 16'h0;
  logic [15:0] ram [256];     // stack RAM 0200h-03FFh
  logic [15:0] len;

  initial for (int i = 0; i < 256; i++) ram[i] = '0;

  function automatic logic [15:0] ram_rd(input logic [15:0] a);
    return ram[a[8:1]];
  endfunction

  always_comb begin
    cpu_o = '0;
    unique case (state)
      S_F0: begin cpu_o.fetch = 1'b1; cpu_o.fetch_addr = pc; end
      S_F1: begin cpu_o.fetch = 1'b1; cpu_o.fetch_addr = pc + 16'd2; end
      S_F2: begin cpu_o.fetch = 1'b1; cpu_o.fetch_addr = pc + 16'd4; end
      default: ;
    endcase
    len = 16'd2;
    if (state == S_EX) begin
      cpu_o.dec_valid = 1'b1;
      cpu_o.dec_ir    = ir;
      cpu_o.dec_ext   = ext1;
      cpu_o.instr_pc  = pc;
      if (ir == 16'h40B2) begin
        cpu_o.dwr = 1'b1; cpu_o.daddr = ext2; cpu_o.dwdata = ext1; len = 16'd6;
      end else if (ir == 16'h4030) begin
        cpu_o.pc_wr = 1'b1; cpu_o.pc_wr_data = ext1;
      end else if (ir == 16'h1230) begin
        cpu_o.dwr = 1'b1; cpu_o.daddr = sp - 16'd2; cpu_o.dwdata = ext1; len = 16'd4;
      end else if (ir == 16'h12B0) begin
        cpu_o.dwr = 1'b1; cpu_o.daddr = sp - 16'd2; cpu_o.dwdata = pc + 16'd4;
        cpu_o.pc_wr = 1'b1; cpu_o.pc_wr_data = ext1;
      end else if (ir == 16'h4130) begin
        cpu_o.pc_wr = 1'b1; cpu_o.pc_wr_data = ram_rd(sp);
      end else if (ir[15:10] == 6'b001111) begin
        cpu_o.jmp = 1'b1; cpu_o.jmp_pc = pc + 16'd2; cpu_o.jmp_off = ir[9:0];
      end else if (ir == WDRST_CODE && ext1 == WDRST_CODE) begin
        len = 16'd4;
      end
    end
  end

  always @(posedge clk) begin
    if (ctl_i.rst) begin
      state <= S_F0;
      pc    <= RESET_PC;
      sp    <= 16'h0400;
    end else if (inj_i) begin
      state <= S_F0;
      pc    <= inj_pc_i;
    end else begin
      unique case (state)
        S_F0: state <= S_F1;
        S_F1: begin ir <= ctl_i.fetch_data;   state <= S_F2; end
        S_F2: begin ext1 <= ctl_i.fetch_data; state <= S_F3; end
        S_F3: begin ext2 <= ctl_i.fetch_data; state <= S_EX; end
        default: if (!ctl_i.stall) begin
          state <= S_F0;
          if (cpu_o.dwr && cpu_o.daddr[15:9] == 7'b0000001) ram[cpu_o.daddr[8:1]] <= cpu_o.dwdata;
          if (ir == 16'h1230 || ir == 16'h12B0) sp <= sp - 16'd2;
          if (ir == 16'h4130) sp <= sp + 16'd2;
          pc <= ctl_i.pc_load ? ctl_i.pc_new : pc + len;
        end
      endcase
    end
  end
endmodule
