// pc_restrict: keeps every program address inside the ROM window.
//
// Code may only run from ROM; RAM holds data only. The guard enforces this by
// forcing the upper address bits of every program address (fetch address and
// every value loaded into the PC) to the fixed bits of the ROM window, so
// that no PC corruption can ever make the CPU execute RAM contents. Only the
// low ROM_AW bits pass through. Purely combinational, no latency.
//
// Forcing the upper PC bits to a constant is the mechanism the design is
// built on. The window itself (4000h-7FFFh, 16 KB) is this design's choice,
// picked to contain the example addresses around 4100h used to explain the
// guard.
module pc_restrict #(
  parameter logic [15:0] ROM_BASE = 16'h4000,  // start of the ROM window, aligned to its size
  parameter int unsigned ROM_AW   = 14         // log2 of the ROM size in bytes
) (
  input  logic [15:0] addr_i,  // raw program address
  output logic [15:0] addr_o   // address forced into the ROM window
);
  localparam logic [15:0] LOW_MASK = 16'((32'd1 << ROM_AW) - 32'd1);

  always_comb addr_o = (ROM_BASE & ~LOW_MASK) | (addr_i & LOW_MASK);
endmodule
