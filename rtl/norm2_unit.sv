// norm2_unit: squared length of one capsule vector, n2 = sum_d x_d^2.
//
// Used twice in the routing datapath: in the Replication_2 step, where the
// squared length of each weighted sum s_j is formed once and then shared by
// all DIM rows of capsule j for the squashing step, and inside the MAG
// function, which reports the length of each output capsule. The squares
// are summed exactly and kept with all 32 fractional bits, so that the
// square root taken from it is exact to the last bit of a Q16 length; the
// sum saturates at NW bits. Those choices are this design's.
//
// Interface: x[d] signed Q15.16; n2 unsigned Q(NW-32).32.
// Timing: purely combinational.
module norm2_unit #(
  parameter int unsigned D  = 16,
  parameter int unsigned NW = 64
) (
  input  logic signed [31:0]   x [D],
  output logic        [NW-1:0] n2
);

  localparam int unsigned AW = 64 + $clog2(D);

  logic [AW-1:0] acc;
  logic signed [63:0] xe;

  always_comb begin
    acc = '0;
    for (int d = 0; d < D; d++) begin
      xe  = 64'(x[d]);
      acc += AW'($unsigned(xe * xe));
    end
    if (acc > AW'({NW{1'b1}})) n2 = '1;
    else                       n2 = NW'(acc);
  end

endmodule
