// tb_norm2_unit: self-checking test of the squared vector length. The
// reference sums the exact squares in 128-bit arithmetic (32 fractional
// bits) and saturates to NW bits.
module tb_norm2_unit;
  localparam int unsigned D  = 16;
  localparam int unsigned NW = 64;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic signed [31:0] x [D];
  logic [NW-1:0]      n2;

  norm2_unit #(.D(D), .NW(NW)) dut (.x(x), .n2(n2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    logic [127:0] acc, sq;
    logic [NW-1:0] expect_n2;
    acc = '0;
    foreach (x[d]) begin
      sq  = 128'(x[d] < 0 ? -64'(x[d]) : 64'(x[d]));
      acc += sq * sq;
    end
    expect_n2 = (acc > 128'({NW{1'b1}})) ? '1 : NW'(acc);
    @(posedge clk);
    checks++;
    if (n2 != expect_n2) begin
      failures++;
      $display("FAIL n2=%0d expected %0d", n2, expect_n2);
    end
  endtask

  initial begin
    foreach (x[d]) x[d] = '0;
    run_one();
    foreach (x[d]) x[d] = 32'sh0001_0000;  // all ones: 16.0
    run_one();
    checks++;
    if (n2 != (NW'(16) << 32)) failures++;
    for (int k = 0; k < 2000; k++) begin
      int sh;
      sh = $urandom_range(4, 16);
      foreach (x[d]) x[d] = $signed($urandom) >>> sh;
      run_one();
    end
    foreach (x[d]) x[d] = 32'sh8000_0000;  // saturates
    run_one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
