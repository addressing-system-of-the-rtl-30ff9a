// dds_pkg: sizes shared by the blocks of the DDS look-up-table addressing system.
//
// The generator keeps one period of a waveform in a look-up table (LUT) and walks through it with
// a phase accumulator. The three sizes below are the document's own: a 32-bit phase accumulator,
// a 12-bit LUT address (the 12 most significant phase bits) and a 12-bit D/A converter, so 12-bit
// samples. The reference (sample) clock is 16 MHz; it only matters for the frequency formula
// F_OUT = M * F_S / 2**PHASE_W, so it is kept here as a number for testbenches and documentation.
package dds_pkg;

  // Resolution N of the phase accumulator and width of the tuning word M.
  localparam int unsigned PHASE_W  = 32;
  // LUT address width: the phase register's most significant bits that address the table.
  localparam int unsigned ADDR_W   = 12;
  // Sample width, equal to the D/A converter's resolution.
  localparam int unsigned SAMPLE_W = 12;
  // Reference clock frequency in Hz (crystal oscillator feeding REF_CLK).
  localparam longint unsigned F_S_HZ = 64'd16_000_000;

  // Operating mode, driven by the LOAD/#RUN line: 1 = load the LUT, 0 = run (generate).
  typedef enum logic {
    MODE_RUN  = 1'b0,
    MODE_LOAD = 1'b1
  } mode_e;

endpackage
