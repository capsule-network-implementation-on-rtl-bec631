// tb_update_b_unit: self-checking test of one logit update,
// b' = b + u . v. The reference forms the exact dot product in 128-bit
// signed arithmetic, shifts out 16 fractional bits, adds b and saturates.
module tb_update_b_unit;
  localparam int unsigned D = 16;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic signed [31:0] b, b_next;
  logic signed [31:0] u [D];
  logic signed [31:0] v [D];

  update_b_unit #(.D(D)) dut (.b(b), .u(u), .v(v), .b_next(b_next));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    logic signed [127:0] acc;
    logic signed [31:0]  expect_b;
    acc = '0;
    foreach (u[d]) acc += 128'(u[d]) * 128'(v[d]);
    acc = (acc >>> 16) + 128'(b);
    if (acc > 128'sh7FFF_FFFF)       expect_b = 32'sh7FFF_FFFF;
    else if (acc < -128'sh8000_0000) expect_b = 32'sh8000_0000;
    else                             expect_b = 32'(acc);
    @(posedge clk);
    checks++;
    if (b_next != expect_b) begin
      failures++;
      $display("FAIL b_next=%0d expected %0d", b_next, expect_b);
    end
  endtask

  initial begin
    // u = v = 0.5 in every dimension: b' = b + 16 * 0.25 = b + 4
    b = 32'sh0001_0000;
    foreach (u[d]) begin u[d] = 32'sh0000_8000; v[d] = 32'sh0000_8000; end
    run_one();
    checks++;
    if (b_next != 32'sh0005_0000) failures++;
    for (int k = 0; k < 2000; k++) begin
      b = $signed($urandom) >>> $urandom_range(4, 16);
      foreach (u[d]) begin
        u[d] = $signed($urandom) >>> $urandom_range(8, 16);
        v[d] = $signed($urandom) >>> $urandom_range(15, 20);
      end
      run_one();
    end
    b = 32'sh7FFF_0000;
    foreach (u[d]) begin u[d] = 32'sh0010_0000; v[d] = 32'sh0010_0000; end
    run_one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
