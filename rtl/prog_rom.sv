// prog_rom: the program ROM of the guarded micro controller.
//
// Holds only executable code; data lives in RAM. Addresses are byte addresses
// within the ROM window; bit 0 is ignored (16 bit words). Two synchronous read
// ports: port A serves instruction fetch, port B lets the approach-1 guard
// load its comparison register from the last word, where the compiler places
// the one address allowed to write the watchdog. Read data appears one cycle
// after the request and holds until the next one.
//
// Unprogrammed words read 0000h, the "null" of empty code space. The contents
// come from INIT_FILE (hex, one word per line) when it is given; testbenches
// may also write the array directly before use. The dual read port is this
// design's choice.
module prog_rom #(
  parameter int unsigned ROM_AW    = 14,  // log2 of the ROM size in bytes
  parameter string       INIT_FILE = ""   // optional $readmemh image
) (
  input  logic              clk,
  input  logic              a_rd_i,
  input  logic [ROM_AW-1:0] a_addr_i,
  output logic [15:0]       a_rdata_o,
  input  logic              b_rd_i,
  input  logic [ROM_AW-1:0] b_addr_i,
  output logic [15:0]       b_rdata_o
);
  localparam int unsigned WORDS = 2 ** (ROM_AW - 1);

  logic [15:0] mem [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (a_rd_i) a_rdata_o <= mem[a_addr_i[ROM_AW-1:1]];
    if (b_rd_i) b_rdata_o <= mem[b_addr_i[ROM_AW-1:1]];
  end
endmodule
