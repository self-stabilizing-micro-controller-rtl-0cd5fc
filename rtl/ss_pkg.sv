// ss_pkg: types and constants shared by the self-stabilizing micro controller
// guard hardware.
//
// The guard sits next to an MSP430-class CPU and makes sure that, after any
// soft error, the CPU returns to executing its intended instructions within a
// bounded time. Three alternative guards exist (see approach_e); all of them
// share a watchdog that cannot be switched off, a program counter that cannot
// leave ROM and a reset controller.
//
// Fixed numbers taken from the MSP430 architecture the guard is built for:
// the watchdog control register lives at 0120h, the WDRST instruction is the
// word 0001h followed by the data word 0001h, and no regular MSP430 opcode
// word lies below 1000h (opcode prefix 000100). The watchdog control layout
// (password 5Ah in the high byte, CNTCL in bit 3, interval select in bits 1:0)
// and the interval lengths are those of the MSP430 WDT+ and are this design's
// choice where the guard's own behaviour is not fixed by them.
package ss_pkg;

  // Which of the three self-stabilization guards a core implements.
  typedef enum logic [1:0] {
    APP_ROM_COMPARE = 2'd1,  // approach 1: WDT writes only from one ROM-stored address
    APP_WDRST       = 2'd2,  // approach 2: WDT out of the address space, WDRST instruction
    APP_ALIGN       = 2'd3   // approach 3: 2^X byte aligned code, checked PC writes
  } approach_e;

  localparam logic [15:0] WDT_ADDR        = 16'h0120;  // WDTCTL address
  localparam logic [15:0] WDRST_CODE      = 16'h0001;  // WDRST opcode and data word
  localparam logic [15:0] LOWEST_OPCODE   = 16'h1000;  // prefix 000100: first valid opcode word
  localparam logic [7:0]  WDT_PASSWORD    = 8'h5A;     // MSP430 WDTCTL write password

  // Watchdog interval select (WDTIS) values and their lengths in ticks.
  localparam logic [1:0]  WDT_IS_MAX      = 2'b00;     // longest interval, used by WDRST

  // Reset request sources. One bit per reason the guard resets the CPU.
  typedef struct packed {
    logic wdt_expired;     // WDT count reached the interval threshold
    logic wdt_overflow;    // WDT count was above the threshold and wrapped
    logic wdt_password;    // write to WDTCTL with a wrong password
    logic wdt_bad_access;  // approach 1: WDT write from an address other than the valid one
    logic illegal_instr;   // opcode word below 1000h (incl. WDRST without its data word)
    logic pc_misaligned;   // approach 3: programmatic PC write not 0 mod 2^X
    logic cpu_fault;       // reset request raised by the CPU core itself
  } rst_src_t;

  // What the CPU core reports to the guard every cycle.
  typedef struct packed {
    logic        fetch;       // instruction fetch from fetch_addr this cycle
    logic [15:0] fetch_addr;  // raw fetch address (the CPU's PC)
    logic        dec_valid;   // an instruction is being decoded
    logic [15:0] dec_ir;      // its first word (opcode word)
    logic [15:0] dec_ext;     // the word that follows it in memory
    logic [15:0] instr_pc;    // address of the instruction now executing
    logic        jmp;         // relative jump taken this cycle (JMP or taken Jcc)
    logic [15:0] jmp_pc;      // PC value the jump is relative to (jump address + 2)
    logic [9:0]  jmp_off;     // the jump's 10 bit signed offset field
    logic        pc_wr;       // other programmatic PC write (CALL, RETURN, MOV ..., PC)
    logic [15:0] pc_wr_data;  // value written to the PC
    logic        dwr;         // data write this cycle
    logic [15:0] daddr;       // data write address
    logic [15:0] dwdata;      // data write value
    logic        fault;       // reset request from the CPU core itself
  } cpu_hooks_t;

  // What the guard returns to the CPU core.
  typedef struct packed {
    logic        rst;         // CPU reset (power-up clear), active high
    logic        stall;       // hold the current instruction (approach 1 check running)
    logic [15:0] fetch_data;  // instruction word at the restricted fetch address
    logic        pc_load;     // load pc_new into the PC this cycle
    logic [15:0] pc_new;      // restricted (and for jumps computed) new PC value
    logic        wdrst;       // a WDRST instruction was executed (32 bit long)
  } cpu_ctl_t;

endpackage
