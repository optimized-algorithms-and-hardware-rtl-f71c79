// median_pkg: constants shared by the 3x3 median/maximum units and the
// filter top. A window is nine pixels P[0..8] in raster order (P[4] is the
// centre pixel). The latencies are the number of register stages of each
// unit, one stage per clock of the algorithms' step sequences; pixel width
// and clock counts are the published ones.
package median_pkg;
  localparam int PIX_W    = 8;   // grey-level pixel width
  localparam int NWIN     = 9;   // pixels in a 3x3 window
  localparam int ALG1_LAT = 10;  // exact median, 17 comparators
  localparam int ALG2_LAT = 9;   // approximate median, 15 comparators
  localparam int ALG3_LAT = 4;   // maximum, 8 comparators
endpackage
