// dot_pro_unit: Dot_Pro function for one row r of the prediction matrix,
//   s_r = sum_i c_ri * u_hat_ri,   i = 0 .. N-1,
// where c_ri is the coupling coefficient of input capsule i to the digit
// capsule owning row r (already replicated onto the row by Replication_1).
// The 160 rows of s together hold the ten weighted sums s_j of
// Procedure 1, line 5.
//
// All N products are formed at once and added in one adder tree that the
// synthesis tool derives from the loop. The sum is kept exact, rescaled to
// 16 fractional bits by an arithmetic shift and saturated to 32 bits; those
// choices are this design's.
//
// Interface: c[i] unsigned Q16.16 (at most 1.0); u[i] and s signed Q15.16.
// Timing: purely combinational; the controller registers s.
module dot_pro_unit
  import capsnet_pkg::*;
#(
  parameter int unsigned N = 31
) (
  input  logic        [31:0] c [N],
  input  logic signed [31:0] u [N],
  output logic signed [31:0] s
);

  localparam int unsigned AW = 64 + $clog2(N);

  logic signed [AW-1:0] acc;
  logic signed [63:0]   ue;
  logic signed [63:0]   ce;

  always_comb begin
    acc = '0;
    for (int i = 0; i < N; i++) begin
      ue  = 64'(u[i]);
      ce  = $signed({32'h0, c[i]});
      acc += AW'(ue * ce);
    end
    s = sat_word(96'(acc >>> 16));
  end

endmodule
