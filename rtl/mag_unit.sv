// mag_unit: MAG function, the length ||v_j|| of one digit capsule.
//
// After the last routing pass the length of each output capsule is the
// class score; the largest one names the recognised digit. The unit forms
// the squared length with norm2_unit (32 fractional bits) and takes its
// square root with sqrt_unit, which leaves 16 fractional bits: the result
// is a word to be scaled by 2^-16, the form in which the source design
// reports its results. The root is rounded down (this design's choice).
//
// Interface: v[d] signed Q15.16; mag unsigned Q16.16 (32 bits).
// Timing: purely combinational; the controller registers mag.
module mag_unit #(
  parameter int unsigned D  = 16,
  parameter int unsigned NW = 64
) (
  input  logic signed [31:0] v [D],
  output logic        [31:0] mag
);

  logic [NW-1:0]   n2;
  logic [NW/2-1:0] len;

  norm2_unit #(.D(D), .NW(NW)) u_norm2 (.x(v), .n2(n2));
  sqrt_unit  #(.AW(NW))        u_sqrt  (.a(n2), .r(len));

  // NW = 64: the root of a saturated Q32.32 square always fits the word.
  always_comb mag = 32'(len);

endmodule
