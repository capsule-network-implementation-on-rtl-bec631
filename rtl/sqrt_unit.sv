// sqrt_unit: integer square root, r = floor(sqrt(a)).
//
// The source design takes its square root from earlier work without giving
// its structure; this design uses the classic digit-by-digit (restoring)
// method, one result bit per step, unrolled so that the whole root is found
// in one combinational pass. A Q16 length is obtained by feeding in the
// squared length shifted left by 16 bits.
//
// Interface: a is an AW-bit unsigned radicand (AW even); r is AW/2 bits.
// Timing: purely combinational.
module sqrt_unit #(
  parameter int unsigned AW = 64
) (
  input  logic [AW-1:0]   a,
  output logic [AW/2-1:0] r
);

  logic [AW-1:0]   rem;
  logic [AW/2-1:0] root;
  logic [AW-1:0]   trial;
  logic [AW-1:0]   rem_hi;

  always_comb begin
    rem  = a;
    root = '0;
    rem_hi = '0;
    for (int i = AW/2-1; i >= 0; i--) begin
      // Compare (remaining value >> 2i) with 4*root + 1.
      trial  = AW'({root, 2'b01});
      rem_hi = rem >> (2*i);
      root   = root << 1;
      if (rem_hi >= trial) begin
        rem  = rem - (trial << (2*i));
        root = root | (AW/2)'(1);
      end
    end
    r = root;
  end

endmodule
