// sine_rom: phase to amplitude converter of the digital frequency
// synthesiser, a full-period sine look-up table as the description names it.
// Entry i holds round(32767 * sin(2*pi*i/1024)) as a 16-bit two's complement
// number; the table is read from rtl/sine_rom.hex. The full-period table
// (no quarter-wave folding), its 1024 x 16 size and the amplitude scale
// 32767 (symmetric, so a mixer can negate any entry) are this design's choice.
// Timing: synchronous read, amplitude is valid one clock after phase.
module sine_rom
  import tx_pkg::*;
#(
  parameter int unsigned K = PHASE_W,
  parameter int unsigned M = AMP_W,
  parameter string       INIT_FILE = "rtl/sine_rom.hex"
) (
  input  logic                clk,
  input  logic [K-1:0]        phase,
  output logic signed [M-1:0] amplitude
);
  logic signed [M-1:0] rom [2**K];

  initial $readmemh(INIT_FILE, rom);

  always_ff @(posedge clk) amplitude <= rom[phase];
endmodule
