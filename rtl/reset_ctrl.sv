// reset_ctrl: turns any reset request of the guard into a CPU reset.
//
// Every detector of the guard (watchdog expiry and overflow, bad watchdog
// password, refused watchdog write, invalid instruction, misaligned PC write,
// and the CPU's own fault request) ends in the same action: the CPU is reset
// and restarts from a known state. A request in any cycle loads a down-counter
// with RST_CYCLES; the reset output stays high while it is non-zero, so the
// reset lasts RST_CYCLES cycles after the last request. The sources of the
// first request of a reset, and any that follow during it, are kept in
// cause_o until the next reset. Power-on (rst_n low) also resets the CPU.
//
// Timing: a request in cycle t gives rst_o high from cycle t+1 to t+RST_CYCLES.
// The reset length and the cause record are this design's choices. A corrupted
// counter only shortens or lengthens one reset, never blocks the next.
module reset_ctrl
  import ss_pkg::*;
#(
  parameter int unsigned RST_CYCLES = 4  // length of a CPU reset in cycles
) (
  input  logic     clk,
  input  logic     rst_n,    // power-on reset
  input  rst_src_t src_i,    // reset requests, any number at once
  output logic     rst_o,    // CPU reset, active high
  output rst_src_t cause_o   // sources of the current/last reset
);
  localparam int unsigned CW = $clog2(RST_CYCLES + 1);

  logic [CW-1:0] cnt_q;
  rst_src_t      cause_q;
  logic          req;

  assign req = |src_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= CW'(RST_CYCLES);
      cause_q <= '0;
    end else if (req) begin
      cnt_q   <= CW'(RST_CYCLES);
      cause_q <= (cnt_q == '0) ? src_i : (cause_q | src_i);
    end else if (cnt_q != '0) begin
      cnt_q <= cnt_q - CW'(1);
    end
  end

  assign rst_o   = (cnt_q != '0);
  assign cause_o = cause_q;
endmodule
