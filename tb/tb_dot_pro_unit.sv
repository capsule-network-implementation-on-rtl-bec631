// tb_dot_pro_unit: self-checking test of one Dot_Pro row,
// s = sum_i c_i * u_i. The reference forms the exact sum in 128-bit signed
// arithmetic, shifts out 16 fractional bits and saturates to 32 bits.
module tb_dot_pro_unit;
  localparam int unsigned N = 31;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic        [31:0] c [N];
  logic signed [31:0] u [N];
  logic signed [31:0] s;

  dot_pro_unit #(.N(N)) dut (.c(c), .u(u), .s(s));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    logic signed [127:0] acc, sh;
    logic signed [31:0]  expect_s;
    acc = '0;
    foreach (c[i]) acc += 128'(signed'({1'b0, c[i]})) * 128'(u[i]);
    sh = acc >>> 16;
    if (sh > 128'sh7FFF_FFFF)       expect_s = 32'sh7FFF_FFFF;
    else if (sh < -128'sh8000_0000) expect_s = 32'sh8000_0000;
    else                            expect_s = 32'(sh);
    @(posedge clk);
    checks++;
    if (s != expect_s) begin
      failures++;
      $display("FAIL s=%0d expected %0d", s, expect_s);
    end
  endtask

  initial begin
    // coefficients of 1/31 and u = 1.0 everywhere: s close to 1.0
    foreach (c[i]) begin c[i] = 32'(65536 / N); u[i] = 32'sh0001_0000; end
    run_one();
    for (int k = 0; k < 2000; k++) begin
      foreach (c[i]) begin
        c[i] = $urandom_range(0, 65536);
        u[i] = $signed($urandom) >>> $urandom_range(8, 16);
      end
      run_one();
    end
    // saturation both ways
    foreach (c[i]) begin c[i] = 32'h0001_0000; u[i] = 32'sh7FFF_FFFF; end
    run_one();
    foreach (c[i]) u[i] = 32'sh8000_0000;
    run_one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
