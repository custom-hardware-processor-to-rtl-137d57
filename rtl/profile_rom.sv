// profile_rom: read-only memory holding the measured diffraction profile.
//
// Each word is the number of counts at one angular step of the scan; the
// angle itself is not stored but follows from the word's address (see
// merit_controller). The memory is 512 words of 13 bits (832 bytes), the
// size of the original design, and is filled from an initialisation file
// of hexadecimal words, so any profile can be loaded without changing the
// logic. The default file holds the two-peak benchmark profile sampled
// from 25.00 deg in steps of 0.02 deg.
//
// Interface and timing: synchronous read, like a block ROM: rdata shows
// the word at addr one clock after addr is presented.
//
// The contents come only from $readmemh; a synthesis flow that ignores
// $readmemh in initial blocks sees an empty memory and removes it.
module profile_rom #(
  parameter int unsigned DEPTH     = 512,
  parameter int unsigned WIDTH     = 13,
  parameter string       INIT_FILE = "rtl/profile_rom.hex"
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk) rdata <= mem[addr];

endmodule
