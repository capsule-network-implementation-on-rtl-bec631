// tb_pow2_q16: self-checking test of the fixed-point 2^x unit.
// Exact powers of two at integer x, random x against the real-valued 2^x
// (relative error below 3e-4 plus one LSB), saturation above the output
// range and flush to zero below it.
module tb_pow2_q16;
  localparam int unsigned OW = 48;

  logic clk = 1'b0;
  int   cycles = 0;
  int   checks = 0, failures = 0;
  logic signed [31:0] x;
  logic [OW-1:0]      y;

  pow2_q16 #(.OW(OW)) dut (.x(x), .y(y));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%0d (%f) y=%0d", what, x, real'(x) / 65536.0, y);
    end
  endtask

  initial begin
    real xr, ref_y, err;
    // integer exponents give exact powers of two
    for (int n = -16; n <= 30; n++) begin
      x = n * 65536;
      @(posedge clk);
      check("integer", y == (OW'(1) << (n + 16)));
    end
    // random exponents against real 2^x
    for (int k = 0; k < 3000; k++) begin
      x = $signed($urandom_range(0, 40 * 65536)) - 20 * 65536;
      @(posedge clk);
      xr    = real'(x) / 65536.0;
      ref_y = (2.0 ** xr) * 65536.0;
      err   = real'(y) - ref_y;
      if (err < 0) err = -err;
      check("random", err <= ref_y * 3.0e-4 + 1.0);
    end
    // saturation and underflow
    x = 40 * 65536;  @(posedge clk); check("saturate", y == '1);
    x = 32'sh7FFF_FFFF; @(posedge clk); check("saturate max", y == '1);
    x = -30 * 65536; @(posedge clk); check("underflow", y == '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
