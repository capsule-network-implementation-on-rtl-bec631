// tb_squash_unit: self-checking test of the squashing function. Random
// capsule vectors of several magnitudes are squashed and compared with the
// real-valued v = s*|s|/(1+|s|^2) (absolute error below 1e-4 per element);
// the squared length input is computed here from the vector.
module tb_squash_unit;
  localparam int unsigned D  = 16;
  localparam int unsigned NW = 64;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic signed [31:0] s [D];
  logic [NW-1:0]      n2;
  logic signed [31:0] v [D];

  squash_unit #(.D(D), .NW(NW)) dut (.s(s), .n2(n2), .v(v));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    real len2, len, scl, r, err, vlen2;
    logic [127:0] acc;
    acc  = '0;
    len2 = 0.0;
    foreach (s[d]) begin
      len2 += (real'(s[d]) / 65536.0) ** 2;
      acc  += 128'(s[d] < 0 ? -64'(s[d]) : 64'(s[d])) ** 2;
    end
    n2 = NW'(acc);
    len = $sqrt(len2);
    scl = len / (1.0 + len2);
    @(posedge clk);
    vlen2 = 0.0;
    foreach (v[d]) begin
      r   = real'(s[d]) / 65536.0 * scl;
      err = real'(v[d]) / 65536.0 - r;
      if (err < 0) err = -err;
      checks++;
      if (err > 1.0e-4) begin
        failures++;
        $display("FAIL d=%0d v=%f ref=%f", d, real'(v[d]) / 65536.0, r);
      end
      vlen2 += (real'(v[d]) / 65536.0) ** 2;
    end
    checks++;
    if (vlen2 >= 1.0) failures++;   // a squashed vector is shorter than 1
  endtask

  initial begin
    foreach (s[d]) s[d] = '0;
    run_one();
    for (int k = 0; k < 1000; k++) begin
      int sh;
      sh = $urandom_range(10, 18);
      foreach (s[d]) s[d] = $signed($urandom) >>> sh;
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
