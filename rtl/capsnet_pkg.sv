// capsnet_pkg: constants, types and fixed-point helpers shared by the
// routing-by-agreement datapath.
//
// Every quantity is a fixed-point number with FRAC = 16 fractional bits held
// in a W = 32 bit word (signed Q15.16 for u_hat, b, s and v; unsigned Q16.16
// for coupling coefficients and capsule lengths), so a raw word times 2^-16
// is the real value. The sizes are those of the design's main configuration:
// 31 input capsules routed to 10 digit capsules of 16 dimensions each, i.e. a
// prediction matrix u_hat of 160 x 31 words. The saturation helpers are this
// design's own choice; overflow behaviour is not specified by the source.
package capsnet_pkg;

  localparam int unsigned W     = 32;  // word width
  localparam int unsigned FRAC  = 16;  // fractional bits
  localparam int unsigned N_IN  = 31;  // input (primary) capsules
  localparam int unsigned N_OUT = 10;  // digit capsules
  localparam int unsigned DIM   = 16;  // dimensions per digit capsule
  localparam int unsigned ITERS = 2;   // routing passes (loop flag 0, then 1)

  // Width of a squared length (unsigned Q32.32, saturated).
  localparam int unsigned NW = 64;

  typedef logic signed [W-1:0] word_t;   // signed Q15.16
  typedef logic        [W-1:0] uword_t;  // unsigned Q16.16

  // Clamp a wide signed value into a signed W-bit word.
  function automatic word_t sat_word(input logic signed [95:0] x);
    if (x > 96'sh7FFF_FFFF)       return word_t'(32'sh7FFF_FFFF);
    else if (x < -96'sh8000_0000) return word_t'(32'sh8000_0000);
    else                          return word_t'(x[W-1:0]);
  endfunction

endpackage
