// tb_sqrt_unit: self-checking test of the integer square root. For every
// radicand a the result r must satisfy r*r <= a < (r+1)*(r+1); tested on
// edge values, perfect squares and random 64-bit radicands.
module tb_sqrt_unit;
  localparam int unsigned AW = 64;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic [AW-1:0]   a;
  logic [AW/2-1:0] r;

  sqrt_unit #(.AW(AW)) dut (.a(a), .r(r));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic test(input logic [AW-1:0] val);
    logic [2*AW-1:0] lo, hi;
    a = val;
    @(posedge clk);
    lo = (2*AW)'(r) * (2*AW)'(r);
    hi = ((2*AW)'(r) + 1) * ((2*AW)'(r) + 1);
    checks++;
    if (!(lo <= (2*AW)'(a) && (2*AW)'(a) < hi)) begin
      failures++;
      $display("FAIL a=%0d r=%0d", a, r);
    end
  endtask

  initial begin
    test('0); test(64'd1); test(64'd2); test(64'd3); test(64'd4);
    test('1); test(64'hFFFF_FFFE_0000_0001); test(64'hFFFF_FFFE_0000_0000);
    for (int k = 1; k < 200; k++) begin
      logic [63:0] q;
      q = {$urandom, $urandom} >> $urandom_range(32, 63);
      test(q * q);
      test(q * q - 1);
    end
    for (int k = 0; k < 2000; k++) test({$urandom, $urandom} >> $urandom_range(0, 63));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
