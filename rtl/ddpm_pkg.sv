// ddpm_pkg: constants and types shared by the DDPM DAC blocks.
//
// The numbers are those of the 8-bit microcontroller DAC the design follows:
// an 8-bit modulator, a 150 MHz system clock and a 500 ns modulation slot
// (75 system clocks, i.e. a 2 MHz DDPM clock), giving 150e6/75/256 =
// 7812.5 samples per second. The enum selecting the test pattern source is
// this design's own.
package ddpm_pkg;

  // Modulator resolution in bits.
  parameter int unsigned DDPM_BITS = 8;

  // System clock and modulation slot length in system clocks.
  parameter int unsigned SYS_CLK_HZ = 150_000_000;
  parameter int unsigned TICK_DIV   = 75;

  // Source of the codes fed to the modulator.
  typedef enum logic {
    PAT_STATIC = 1'b0,  // one constant code (static transfer test)
    PAT_SINE   = 1'b1   // sine wave samples
  } pattern_mode_e;

endpackage
