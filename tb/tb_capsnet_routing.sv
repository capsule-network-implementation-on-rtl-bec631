// tb_capsnet_routing: end-to-end test of the routing accelerator.
//
// Its parameters default to a reduced size (8 input capsules, 6 digit
// capsules of 8 dimensions, two routing passes) because the fully parallel
// datapath at its full size (31 x 10 x 16) produces a very large simulation
// model that takes verilator over ten minutes to build. The full size is
// run by overriding them, e.g. verilator ... -GN_IN=31 -GN_OUT=10 -GDIM=16.
//
// For each test image a prediction matrix u_hat is generated here: the 31
// predictions for the target digit agree (a common random vector plus small
// noise) while those for the other digits are independent random vectors,
// as in a real image where one digit capsule collects agreeing votes. The
// matrix is written through the load port, a run is started, and
// - the number of cycles from start to done must be 7*ITERS + 1 edges,
// - every capsule length must match a real-valued model of the same
//   algorithm (2^b softmax, weighted sum, squash, agreement update, length)
//   to within 2e-3,
// - the longest capsule must be the target digit.
// It also counts how often each mechanism of the flowchart ran: the
// Update_b branch (loop flag 0), the MAG branch (flag 1), a run restarted
// after done, and a load attempt ignored while a run was busy; a mechanism
// that never ran counts as a failure.
module tb_capsnet_routing #(
  parameter int N_IN   = 8,
  parameter int N_OUT  = 6,
  parameter int DIM    = 8,
  parameter int ITERS  = 2,
  parameter int IMAGES = 10
);
  localparam int ROWS = N_OUT * DIM;
  localparam int RW   = $clog2(ROWS);
  localparam int CW   = $clog2(N_IN);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic u_we = 1'b0;
  logic [RW-1:0] u_row = '0;
  logic [CW-1:0] u_col = '0;
  logic signed [31:0] u_wdata = '0;
  logic busy, done;
  logic [31:0] mag_v [N_OUT];

  int checks = 0, failures = 0;
  int n_update = 0, n_mag = 0, n_restart = 0, n_blocked = 0;

  capsnet_routing #(.N_IN(N_IN), .N_OUT(N_OUT), .DIM(DIM), .ITERS(ITERS)) dut (
    .clk, .rst_n, .start, .u_we, .u_row, .u_col, .u_wdata,
    .busy, .done, .mag_v);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count the two branches of the loop flag as they happen.
  always @(posedge clk) begin
    if (dut.u_ctrl.en_update_b) n_update++;
    if (dut.u_ctrl.en_mag)      n_mag++;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Raw Q15.16 matrix and its real-valued copy.
  int  ur [ROWS][N_IN];
  real uf [ROWS][N_IN];

  function automatic int rnd_q16(real lo, real hi);
    real r;
    r = lo + (hi - lo) * (real'($urandom_range(0, 1000000)) / 1000000.0);
    return int'(r * 65536.0);
  endfunction

  task automatic make_image(input int target);
    real base [DIM];
    foreach (base[d]) base[d] = real'(rnd_q16(-0.5, 0.5)) / 65536.0;
    for (int r = 0; r < ROWS; r++)
      for (int i = 0; i < N_IN; i++) begin
        if (r / DIM == target)
          ur[r][i] = int'(base[r % DIM] * 65536.0) + rnd_q16(-0.05, 0.05);
        else
          ur[r][i] = rnd_q16(-0.3, 0.3);
        uf[r][i] = real'(ur[r][i]) / 65536.0;
      end
  endtask

  // Real-valued routing with 2^b in place of exp.
  task automatic model(output real len [N_OUT]);
    real b [N_OUT][N_IN];
    real c [N_OUT][N_IN];
    real s [N_OUT][DIM];
    real v [N_OUT][DIM];
    real den, l2, sc;
    foreach (b[j, i]) b[j][i] = 0.0;
    for (int p = 0; p < ITERS; p++) begin
      for (int i = 0; i < N_IN; i++) begin
        den = 0.0;
        for (int j = 0; j < N_OUT; j++) den += 2.0 ** b[j][i];
        for (int j = 0; j < N_OUT; j++) c[j][i] = (2.0 ** b[j][i]) / den;
      end
      for (int j = 0; j < N_OUT; j++) begin
        l2 = 0.0;
        for (int d = 0; d < DIM; d++) begin
          s[j][d] = 0.0;
          for (int i = 0; i < N_IN; i++) s[j][d] += c[j][i] * uf[j*DIM+d][i];
          l2 += s[j][d] ** 2;
        end
        sc = $sqrt(l2) / (1.0 + l2);
        for (int d = 0; d < DIM; d++) v[j][d] = s[j][d] * sc;
      end
      if (p < ITERS - 1)
        for (int j = 0; j < N_OUT; j++)
          for (int i = 0; i < N_IN; i++)
            for (int d = 0; d < DIM; d++) b[j][i] += uf[j*DIM+d][i] * v[j][d];
    end
    for (int j = 0; j < N_OUT; j++) begin
      l2 = 0.0;
      for (int d = 0; d < DIM; d++) l2 += v[j][d] ** 2;
      len[j] = $sqrt(l2);
    end
  endtask

  task automatic load_image();
    for (int r = 0; r < ROWS; r++)
      for (int i = 0; i < N_IN; i++) begin
        @(negedge clk);
        u_we    = 1'b1;
        u_row   = RW'(r);
        u_col   = CW'(i);
        u_wdata = ur[r][i];
      end
    @(negedge clk);
    u_we = 1'b0;
  endtask

  task automatic run_image(input int target, input bit poke_while_busy);
    real len [N_OUT];
    real err;
    int  lat, best;
    make_image(target);
    load_image();
    model(len);
    @(negedge clk);
    start = 1'b1;
    lat = 0;
    do begin
      @(negedge clk);
      lat++;
      if (poke_while_busy && busy && lat == 3) begin
        // a write while busy must be ignored
        u_we = 1'b1; u_row = RW'(target * DIM); u_col = '0; u_wdata = 32'sh7FFF_0000;
        @(negedge clk);
        lat++;
        u_we = 1'b0;
        check("write ignored while busy", dut.u[target*DIM][0] == ur[target*DIM][0]);
        n_blocked++;
      end
    end while (!done && lat < 1000);
    // lat counts the sampling edge as edge 1
    check($sformatf("latency %0d edges", lat), lat == 7 * ITERS + 1);
    best = 0;
    for (int j = 0; j < N_OUT; j++) begin
      err = real'(mag_v[j]) / 65536.0 - len[j];
      if (err < 0) err = -err;
      check($sformatf("image %0d capsule %0d: %0d (%f) ref %f", target, j,
                      mag_v[j], real'(mag_v[j]) / 65536.0, len[j]), err < 2.0e-3);
      if (mag_v[j] > mag_v[best]) best = j;
    end
    check($sformatf("recognised %0d want %0d", best, target), best == target);
    $write("image target %0d: lengths (Q16.16)", target);
    foreach (mag_v[j]) $write(" %0d", mag_v[j]);
    $write("\n");
    // done is held until start drops
    repeat (3) @(negedge clk);
    check("done held", done && !busy);
    start = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check("idle after start drops", !done && !busy);
    n_restart++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    foreach (mag_v[j]) check("reset clears outputs", mag_v[j] == 0);
    run_image(5 % N_OUT, 1'b1);
    for (int k = 1; k < IMAGES; k++) run_image($urandom_range(0, N_OUT - 1), 1'b0);
    check("Update_b branch ran", n_update == IMAGES * (ITERS - 1));
    check("MAG branch ran", n_mag == IMAGES);
    check("runs restarted", n_restart == IMAGES);
    check("busy write blocked", n_blocked > 0);
    $display("mechanisms: update_b=%0d mag=%0d runs=%0d blocked_writes=%0d",
             n_update, n_mag, n_restart, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
