// tb_softmax_unit: self-checking test of the 2^x softmax of one input
// capsule. Equal logits must give floor(1/N) in Q16 exactly; random logits
// are compared with the real-valued 2^b_j / sum_k 2^b_k (absolute error
// below 3e-4), and each set of coefficients must sum to about one.
module tb_softmax_unit;
  localparam int unsigned N = 10;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic signed [31:0] b [N];
  logic        [31:0] c [N];

  softmax_unit #(.N(N)) dut (.b(b), .c(c));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) failures++;
    if (!ok) $display("FAIL %s", what);
  endtask

  initial begin
    real den, r, err, tot;
    // all logits zero: c = 1/N
    foreach (b[j]) b[j] = '0;
    @(posedge clk);
    foreach (c[j]) check("uniform", c[j] == 32'(65536 / N));
    // one dominant logit
    foreach (b[j]) b[j] = '0;
    b[5] = 8 * 65536;
    @(posedge clk);
    check("dominant", c[5] > 32'd62000 && c[0] < 32'd300);
    // random logits
    for (int k = 0; k < 500; k++) begin
      foreach (b[j]) b[j] = $signed($urandom_range(0, 12 * 65536)) - 6 * 65536;
      @(posedge clk);
      den = 0.0;
      foreach (b[j]) den += 2.0 ** (real'(b[j]) / 65536.0);
      tot = 0.0;
      foreach (c[j]) begin
        r   = (2.0 ** (real'(b[j]) / 65536.0)) / den;
        err = real'(c[j]) / 65536.0 - r;
        if (err < 0) err = -err;
        check($sformatf("random j=%0d c=%0d ref=%f", j, c[j], r), err < 3.0e-4);
        tot += real'(c[j]) / 65536.0;
      end
      check("sum to one", tot > 0.998 && tot <= 1.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
