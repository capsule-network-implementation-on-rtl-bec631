// pow2_q16: combinational fixed-point power of two, y = 2^x.
//
// The softmax of the routing algorithm needs exp(b); following the source
// design, exp is replaced by 2^b, which leaves the routing result unchanged
// in practice because the logits are close to zero. How 2^x is evaluated is
// this design's own choice: x (signed Q15.16) is split into an integer part
// n = floor(x) and a fraction f in [0,1). 2^f is read from a 17-point table,
// T[k] = round(65536 * 2^(k/16)), k = 0..16, indexed by the top four bits of
// f and linearly interpolated with the remaining twelve bits (relative error
// below 0.02%). The mantissa is then shifted left by n or right by -n.
//
// Interface: x is signed Q15.16; y is unsigned Q(OW-16).16. y saturates to
// all ones when 2^x does not fit and becomes 0 when it underflows.
// Timing: purely combinational.
module pow2_q16 #(
  parameter int unsigned OW = 48  // output width, 16 fractional bits
) (
  input  logic signed [31:0]   x,
  output logic        [OW-1:0] y
);

  localparam logic [17:0] T [17] = '{
    18'd65536, 18'd68438, 18'd71468, 18'd74632, 18'd77936, 18'd81386,
    18'd84990, 18'd88752, 18'd92682, 18'd96785, 18'd101070, 18'd105545,
    18'd110218, 18'd115098, 18'd120194, 18'd125515, 18'd131072 };

  logic signed [15:0] n;        // integer part
  logic        [3:0]  k;        // table index
  logic        [11:0] t;        // interpolation weight
  logic        [17:0] m;        // 2^f in Q1.16, in [1, 2]
  logic        [29:0] delta;
  logic        [OW+17:0] wide;

  always_comb begin
    n     = x[31:16];
    k     = x[15:12];
    t     = x[11:0];
    delta = 30'(T[{1'b0, k} + 5'd1] - T[{1'b0, k}]) * 30'(t);
    m     = T[{1'b0, k}] + 18'(delta >> 12);
    wide  = '0;
    if (n >= 0) begin
      if (n > 16'(OW - 18)) y = '1;              // 2^x does not fit
      else begin
        wide = (OW+18)'(m) << n;
        y    = wide[OW-1:0];
      end
    end else begin
      if (-n > 16'sd17) y = '0;                  // underflow
      else begin
        wide = (OW+18)'(m) >> (-n);
        y    = wide[OW-1:0];
      end
    end
  end

endmodule
