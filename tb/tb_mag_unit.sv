// tb_mag_unit: self-checking test of the MAG function (capsule length).
// Exact lengths for axis-aligned vectors and random vectors against the
// real-valued Euclidean length (error below 2 LSB of Q16.16).
module tb_mag_unit;
  localparam int unsigned D = 16;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic signed [31:0] v [D];
  logic [31:0]        mag;

  mag_unit #(.D(D)) dut (.v(v), .mag(mag));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_close(input real ref_len);
    real err;
    @(posedge clk);
    err = real'(mag) - ref_len * 65536.0;
    if (err < 0) err = -err;
    checks++;
    if (err > 2.0) begin
      failures++;
      $display("FAIL mag=%0d ref=%f", mag, ref_len * 65536.0);
    end
  endtask

  initial begin
    real l2;
    foreach (v[d]) v[d] = '0;
    check_close(0.0);
    v[3] = -32'sd62881;            // a single axis: length = |v_3|
    check_close(62881.0 / 65536.0);
    v[3] = 32'sd3 << 16; v[7] = 32'sd4 << 16;  // 3-4-5 triangle
    check_close(5.0);
    for (int k = 0; k < 2000; k++) begin
      int sh;
      sh = $urandom_range(12, 20);
      l2 = 0.0;
      foreach (v[d]) begin
        v[d] = $signed($urandom) >>> sh;
        l2  += (real'(v[d]) / 65536.0) ** 2;
      end
      check_close($sqrt(l2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
