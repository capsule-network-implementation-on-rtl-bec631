// tb_routing_ctrl: self-checking test of the routing controller. For two
// and three routing passes it records which flowchart step is active in
// every cycle and compares the sequence with the expected one
// (SOFTMAX, REP1, DOT_PRO, REP2, SQUASH, RESHAPE, then UPDATE_B while the
// loop flag is 0 or MAG once it is 1), checks the clear of the logits at
// start, the start-to-done latency of 7*ITERS cycles, that done is held
// while start stays high and that the controller returns to idle after.
module tb_routing_ctrl;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  int   checks = 0, failures = 0;

  typedef struct packed {
    logic clear_b, softmax, rep1, dot, rep2, squash, reshape, upd, mag,
          flag, busy, done;
  } obs_t;
  obs_t o2, o3;

  routing_ctrl #(.ITERS(2)) dut2 (
    .clk, .rst_n, .start,
    .clear_b(o2.clear_b), .en_softmax(o2.softmax), .en_rep1(o2.rep1),
    .en_dot(o2.dot), .en_rep2(o2.rep2), .en_squash(o2.squash),
    .en_reshape(o2.reshape), .en_update_b(o2.upd), .en_mag(o2.mag),
    .flag(o2.flag), .busy(o2.busy), .done(o2.done));

  routing_ctrl #(.ITERS(3)) dut3 (
    .clk, .rst_n, .start,
    .clear_b(o3.clear_b), .en_softmax(o3.softmax), .en_rep1(o3.rep1),
    .en_dot(o3.dot), .en_rep2(o3.rep2), .en_squash(o3.squash),
    .en_reshape(o3.reshape), .en_update_b(o3.upd), .en_mag(o3.mag),
    .flag(o3.flag), .busy(o3.busy), .done(o3.done));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Step code of one observation: 1..8 for the eight steps, 0 for none,
  // 9 for more than one.
  function automatic int step_of(obs_t o);
    int n, code;
    n = 0; code = 0;
    if (o.softmax) begin n++; code = 1; end
    if (o.rep1)    begin n++; code = 2; end
    if (o.dot)     begin n++; code = 3; end
    if (o.rep2)    begin n++; code = 4; end
    if (o.squash)  begin n++; code = 5; end
    if (o.reshape) begin n++; code = 6; end
    if (o.upd)     begin n++; code = 7; end
    if (o.mag)     begin n++; code = 8; end
    return (n > 1) ? 9 : code;
  endfunction

  task automatic run(input int iters);
    int seq[$];
    int expected[$];
    int lat;
    obs_t o;
    for (int p = 0; p < iters; p++) begin
      expected.push_back(1); expected.push_back(2); expected.push_back(3);
      expected.push_back(4); expected.push_back(5); expected.push_back(6);
      expected.push_back(p == iters - 1 ? 8 : 7);
    end
    // idle: nothing active
    @(negedge clk);
    o = (iters == 2) ? o2 : o3;
    check("idle quiet", step_of(o) == 0 && !o.busy && !o.done && !o.clear_b);
    start = 1'b1;
    #1;
    // still idle before the sampling edge, clear_b requested
    o = (iters == 2) ? o2 : o3;
    check("clear_b with start", o.clear_b);
    lat = 0;
    do begin
      @(negedge clk);
      lat++;
      o = (iters == 2) ? o2 : o3;
      check("no clear_b while running", !o.clear_b);
      if (!o.done) begin
        seq.push_back(step_of(o));
        check("busy while running", o.busy);
        // flag is 1 exactly in the last pass
        if (o.upd) check("flag 0 at update_b", !o.flag);
        if (o.mag) check("flag 1 at mag", o.flag);
      end
    end while (!o.done && lat < 100);
    // lat counts clock edges from the one that samples start (edge 1)
    // to the one that enters DONE: 7*ITERS edges after the sampling edge.
    check($sformatf("latency %0d", lat), lat - 1 == 7 * iters);
    check("sequence length", seq.size() == expected.size());
    foreach (expected[k])
      if (k < seq.size())
        check($sformatf("step %0d: got %0d want %0d", k, seq[k], expected[k]),
              seq[k] == expected[k]);
    // done is held while start stays high
    repeat (5) begin
      @(negedge clk);
      o = (iters == 2) ? o2 : o3;
      check("done held", o.done && !o.busy);
    end
    start = 1'b0;
    @(negedge clk);
    @(negedge clk);
    o = (iters == 2) ? o2 : o3;
    check("back to idle", !o.done && !o.busy);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(2);
    run(3);
    // reset in the middle of a run returns to idle
    start = 1'b1;
    repeat (4) @(negedge clk);
    check("busy mid run", o2.busy);
    rst_n = 1'b0;
    start = 1'b0;
    @(negedge clk);
    check("reset to idle", !o2.busy && !o2.done && step_of(o2) == 0);
    rst_n = 1'b1;
    run(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
