// squash_unit: squashing non-linearity of one digit capsule, Eq. (2):
//   v = s * ||s|| / (1 + ||s||^2).
//
// The squared length n2 = ||s||^2 arrives from the Replication_2 step
// (norm2_unit, 32 fractional bits). The unit takes its square root with
// sqrt_unit, which gives ||s|| with 16 fractional bits, forms the common
// scale factor ||s|| / (1 + ||s||^2) with one divider, keeping 32
// fractional bits of it because it is at most 0.5, and multiplies every
// element of s by it. Rounding is by truncation throughout; widths and the
// single shared divider are this design's own choices.
//
// Interface: s[d] signed Q15.16, n2 unsigned Q32.32 (NW = 64 bits);
// v[d] signed Q15.16 with |v| < 1.
// Timing: purely combinational; the controller registers v.
module squash_unit #(
  parameter int unsigned D  = 16,
  parameter int unsigned NW = 64
) (
  input  logic signed [31:0]   s [D],
  input  logic        [NW-1:0] n2,
  output logic signed [31:0]   v [D]
);

  localparam int unsigned DW = NW + 17;  // divider width

  logic [NW/2-1:0]    len;    // ||s||, Q.16
  logic [DW-1:0]      num;
  logic [DW-1:0]      den;
  logic [31:0]        scale;  // ||s|| / (1 + ||s||^2), Q0.32, at most 0.5
  logic signed [65:0] prod;

  sqrt_unit #(.AW(NW)) u_sqrt (.a(n2), .r(len));

  always_comb begin
    num   = DW'(len) << 48;                 // Q.64
    den   = DW'(n2) + (DW'(1) << 32);       // 1 + ||s||^2, Q.32
    scale = 32'(num / den);                 // Q.32
    for (int d = 0; d < D; d++) begin
      prod = 66'(s[d]) * $signed({34'h0, scale});
      v[d] = 32'(prod >>> 32);
    end
  end

endmodule
