// wdt_access_check: approach-1 check of every watchdog write (register/ROM compare).
//
// Only one instruction in the whole program, at a fixed address in the main
// loop, may write the watchdog. The compiler stores that address in the last
// word of ROM, where no soft error can change it. On every write to WDTCTL
// (0120h) this block stalls the CPU, reloads its comparison register from ROM
// (so a corrupted copy never survives to the next check) and compares it with
// the address of the instruction doing the write. On a match the write is
// passed to the watchdog; otherwise a CPU reset is requested. Reads of WDTCTL
// and writes to any other address pass unchecked.
//
// Timing (ROM read latency one cycle):
//   cycle 0  write seen, ROM read of VALID_LOC issued, stall_o = 1
//   cycle 1  comparison register loaded from ROM,     stall_o = 1
//   cycle 2  compare: wdt_wr_o or bad_access_o pulses, stall_o = 0
// The CPU holds the write and its instruction address while stalled. A write
// that disappears during the check (a CPU upset by a soft error) is refused
// like a write from a wrong address. The slowdown only hits the single
// intended watchdog write per main-loop pass.
// The state machine returns to IDLE from any state, including one reached by
// a soft error, and is cleared by the CPU reset clr_i.
module wdt_access_check
  import ss_pkg::*;
#(
  parameter logic [15:0] VALID_LOC = 16'h7FFE  // ROM word holding the valid address
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr_i,         // CPU reset (synchronous)
  input  logic        dwr_i,         // CPU data write
  input  logic [15:0] daddr_i,       // its address
  input  logic [15:0] instr_pc_i,    // address of the writing instruction
  output logic        stall_o,       // hold the CPU
  output logic        rom_rd_o,      // ROM read request
  output logic [15:0] rom_addr_o,    // ROM read address
  input  logic [15:0] rom_rdata_i,   // ROM data, one cycle after rom_rd_o
  output logic        wdt_wr_o,      // write granted: pass it to the watchdog
  output logic        bad_access_o   // write refused: reset request
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_CMP} state_e;

  state_e      state_q, state_d;
  logic [15:0] cmp_q;
  logic        wdt_access;
  logic        match;

  always_comb begin
    wdt_access   = dwr_i && (daddr_i == WDT_ADDR);
    // Equality as the AND of all bitwise agreements.
    match        = &(~(cmp_q ^ instr_pc_i));
    state_d      = S_IDLE;
    stall_o      = 1'b0;
    rom_rd_o     = 1'b0;
    wdt_wr_o     = 1'b0;
    bad_access_o = 1'b0;
    unique case (state_q)
      S_IDLE: if (wdt_access) begin
        rom_rd_o = 1'b1;
        stall_o  = 1'b1;
        state_d  = S_LOAD;
      end
      S_LOAD: begin
        stall_o = 1'b1;
        state_d = S_CMP;
      end
      S_CMP: begin
        wdt_wr_o     = wdt_access && match;
        bad_access_o = !(wdt_access && match);
      end
      default: state_d = S_IDLE;
    endcase
  end
  assign rom_addr_o = VALID_LOC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cmp_q   <= '0;
    end else begin
      state_q <= clr_i ? S_IDLE : state_d;
      if (state_q == S_LOAD) cmp_q <= rom_rdata_i;
    end
  end

endmodule
