// update_b_unit: Update_b function for one (input capsule i, digit capsule j)
// pair, Procedure 1 line 7:
//   b_ij <- b_ij + u_hat_j|i . v_j = b_ij + sum_d u_hat[j*D+d][i] * v_j[d].
//
// The agreement term is the dot product of the prediction u_hat_j|i with
// the squashed output v_j (taken from the Reshaping step's 10 x 16 matrix).
// All D products are formed at once; the exact sum is rescaled to 16
// fractional bits and the new logit saturated to 32 bits (this design's
// choice).
//
// Interface: b, u[d], v[d] and b_next signed Q15.16.
// Timing: purely combinational; the controller registers b_next.
module update_b_unit
  import capsnet_pkg::*;
#(
  parameter int unsigned D = 16
) (
  input  logic signed [31:0] b,
  input  logic signed [31:0] u [D],
  input  logic signed [31:0] v [D],
  output logic signed [31:0] b_next
);

  localparam int unsigned AW = 64 + $clog2(D);

  logic signed [AW-1:0] acc;
  logic signed [63:0]   ue;
  logic signed [63:0]   ve;

  always_comb begin
    acc = '0;
    for (int d = 0; d < D; d++) begin
      ue  = 64'(u[d]);
      ve  = 64'(v[d]);
      acc += AW'(ue * ve);
    end
    b_next = sat_word(96'(acc >>> 16) + 96'(b));
  end

endmodule
