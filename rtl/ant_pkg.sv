// ant_pkg: sizes shared by the blocks of the algorithmic-noise-tolerant (ANT)
// multiplier.
//
// MAIN_W is the operand width of the main (full-precision) multiplier and
// RPR_W that of the reduced-precision replica; both are the published sizes
// (a 16x16 ANT multiplier with an 8-bit fixed-width replica). TH_RPR_LSB, the
// decision threshold counted in units of one replica output LSB, is this
// design's choice: no value is published.
package ant_pkg;
  parameter int unsigned MAIN_W     = 16;
  parameter int unsigned RPR_W      = 8;
  parameter int unsigned TH_RPR_LSB = 3;
endpackage
