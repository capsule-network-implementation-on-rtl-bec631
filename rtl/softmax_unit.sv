// softmax_unit: coupling coefficients of one input capsule i,
//   c_ij = 2^b_ij / sum_k 2^b_ik,   j, k = 0 .. N-1.
//
// This is Eq. (1) of the routing algorithm with exp replaced by 2^x, as in
// the source design. Each logit goes through a pow2_q16; the N powers are
// summed and every power is divided by the sum with one divider per output
// (a behavioural, fully parallel datapath, as the source describes it).
// The divider shape, the widths and the rule that an all-zero sum gives all
// zero coefficients are this design's own choices.
//
// Interface: b[j] signed Q15.16 logits; c[j] unsigned Q16.16 in [0, 1].
// Timing: purely combinational; the controller registers c.
module softmax_unit #(
  parameter int unsigned N = 10  // digit capsules competing for input i
) (
  input  logic signed [31:0] b [N],
  output logic        [31:0] c [N]
);

  localparam int unsigned PW = 48;             // width of 2^b
  localparam int unsigned SW = PW + $clog2(N); // width of the sum

  logic [PW-1:0] p [N];
  logic [SW-1:0] sum;
  logic [PW+15:0] num;
  logic [PW+15:0] q;

  for (genvar j = 0; j < N; j++) begin : g_pow
    pow2_q16 #(.OW(PW)) u_pow (.x(b[j]), .y(p[j]));
  end

  always_comb begin
    sum = '0;
    for (int j = 0; j < N; j++) sum += SW'(p[j]);
    for (int j = 0; j < N; j++) begin
      num = {p[j], 16'h0000};
      q   = '0;
      if (sum != '0) q = num / (PW+16)'(sum);
      c[j] = 32'(q);
    end
  end

endmodule
