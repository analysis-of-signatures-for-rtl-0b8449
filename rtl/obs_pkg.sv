// obs_pkg: constants shared by the observation IP blocks.
//
// The observation IP folds wide bus traffic into a W-bit word and turns the
// stream of folded words into signatures. The main configuration is a 32-bit
// signature path with the characteristic polynomial x^32+x^25+x^15+x^7+1; the
// 16-bit polynomial x^16+x^5+x^3+x^2+1 is the one the 16-bit variant uses.
//
// A polynomial is stored as a W-bit word whose bit k is the coefficient of
// x^k (the x^W term is implied). The default input width of 66 bits is the
// worked example of a width that is not a multiple of the word size; any
// width can be chosen when the IP is instantiated.
package obs_pkg;

  // Signature / compressed word width of the main configuration.
  localparam int unsigned SIG_W = 32;

  // Default width of the observed bus (example width, not a multiple of 32).
  localparam int unsigned IN_W = 66;

  // x^32 + x^25 + x^15 + x^7 + 1
  localparam logic [31:0] POLY32 = (32'd1 << 25) | (32'd1 << 15) | (32'd1 << 7) | 32'd1;

  // x^16 + x^5 + x^3 + x^2 + 1
  localparam logic [15:0] POLY16 = (16'd1 << 5) | (16'd1 << 3) | (16'd1 << 2) | 16'd1;

endpackage
