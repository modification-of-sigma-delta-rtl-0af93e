// Testbench for mash_modulator.
//   dut  : defaults (8-bit sample, loop orders 2 and 2, 3-bit stage 2)
//   dut1 : loop orders 1 and 1 (the converter before the order increase)
// For dut, a reference model of both stages (own error histories, stage 2
// fed with the registered stage-1 error plus the offset 2^9) must match q1,
// q2 and the clamp flags on every tick. The ideal analog recombination
//   Y[n] = 256*q1[n] + 128*(q2[n] - 2 q2[n-1] + q2[n-2])
// must then equal x - (1-z^-1)^4 e2 exactly, with e2 the model's stage-2
// error, whenever no error register saturated: this is the MASH
// cancellation and depends on the alignment of the two outputs. For both
// instances, the mean of Y over long runs of a constant input must equal the
// input. Inputs near the ends of the range make both stages clamp.
module tb_mash_modulator;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic [7:0] x = '0;
  logic q1, ovl1, ovl2, es;
  logic [2:0] q2;
  logic r1, ro1, ro2, res;
  logic [2:0] r2;
  int checks = 0, failures = 0;
  int n_ovl1 = 0, n_ovl2 = 0, n_ident = 0;

  always #5 clk = ~clk;

  mash_modulator dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x),
    .q1(q1), .q2(q2), .ovl1(ovl1), .ovl2(ovl2), .esat(es));
  mash_modulator #(.ORDER1(1), .ORDER2(1)) dut1 (.clk(clk), .rst_n(rst_n), .en(en), .x(x),
    .q1(r1), .q2(r2), .ovl1(ro1), .ovl2(ro2), .esat(res));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int fdiv(input int v, input int d);  // floor(v/d)
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction
  function automatic int clip(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // Model state (default instance).
  int a1, a2, e1_reg, b1, b2, q1_reg, ovl1_reg, sat1_reg;
  int e2h[5];          // e2[n], e2[n-1], ...
  int q2h[3];          // DUT q2[n], q2[n-1], q2[n-2]
  int rq2h[2];         // dut1 q2[n], q2[n-1]
  int x_prev, ticks, quiet, any_sat;
  longint sumY, sumY1;

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    en = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    a1 = 0; a2 = 0; e1_reg = 0; b1 = 0; b2 = 0; q1_reg = 0; ovl1_reg = 0; sat1_reg = 0;
    foreach (e2h[i]) e2h[i] = 0;
    foreach (q2h[i]) q2h[i] = 0;
    foreach (rq2h[i]) rq2h[i] = 0;
    x_prev = 0; ticks = 0; quiet = 0; any_sat = 0; sumY = 0; sumY1 = 0;
  endtask

  task automatic step(input int xv);
    int v1, q1m, e1, v2, q2m, e2, y, y1;
    bit c1, c2, s1, s2;
    @(negedge clk);
    x = 8'(xv);
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    // Stage 2 on last tick's stage-1 error.
    v2 = e1_reg + 512 + 2 * b1 - b2;
    q2m = fdiv(v2, 128);
    c2 = (q2m < 0 || q2m > 7);
    q2m = clip(q2m, 0, 7);
    e2 = v2 - 128 * q2m;
    s2 = (e2 < -1024 || e2 > 1023);
    e2 = clip(e2, -1024, 1023);
    b2 = b1; b1 = e2;
    // Stage 1 on this tick's input.
    v1 = xv + 2 * a1 - a2;
    q1m = fdiv(v1, 256);
    c1 = (q1m < 0 || q1m > 1);
    q1m = clip(q1m, 0, 1);
    e1 = v1 - 256 * q1m;
    s1 = (e1 < -1024 || e1 > 1023);
    e1 = clip(e1, -1024, 1023);
    a2 = a1; a1 = e1;
    // Outputs: stage 1 delayed one tick.
    check(int'(q1) == q1_reg, "q1");
    check(int'(q2) == q2m, "q2");
    check(int'(ovl1) == ovl1_reg && ovl2 == c2, "clamp flags");
    check(es == (sat1_reg != 0 || s2), "saturation flag");
    if (ovl1) n_ovl1++;
    if (ovl2) n_ovl2++;
    // Recombination.
    for (int i = 4; i > 0; i--) e2h[i] = e2h[i-1];
    e2h[0] = e2;
    q2h[2] = q2h[1]; q2h[1] = q2h[0]; q2h[0] = int'(q2);
    y = 256 * int'(q1) + 128 * (q2h[0] - 2 * q2h[1] + q2h[2]);
    quiet = (s1 || s2 || sat1_reg != 0) ? 0 : quiet + 1;
    if (quiet == 0) any_sat = 1;
    if (ticks >= 6 && quiet >= 6) begin
      check(y == x_prev - (e2h[0] - 4 * e2h[1] + 6 * e2h[2] - 4 * e2h[3] + e2h[4]),
            "MASH cancellation identity");
      n_ident++;
    end
    rq2h[1] = rq2h[0]; rq2h[0] = int'(r2);
    y1 = 256 * int'(r1) + 128 * (rq2h[0] - rq2h[1]);
    if (ticks >= 4) begin
      sumY += y;
      sumY1 += y1;
    end
    e1_reg = e1; q1_reg = q1m; ovl1_reg = c1; sat1_reg = s1;
    x_prev = xv;
    ticks++;
  endtask

  initial begin
    int xv;
    repeat (2) @(negedge clk);
    for (int t = 0; t < 10; t++) begin
      xv = (t == 0) ? 0 : (t == 1) ? 255 : int'($urandom_range(10, 245));
      do_reset();
      for (int n = 0; n < 2004; n++) step(xv);
      // Mean over 2000 ticks; the telescoped error is at most 2*8*max|e2|.
      // (skipped for orders 2/2 when an error register saturated: overload)
      if (any_sat == 0)
        check(sumY - 2000 * xv <= 4096 && 2000 * xv - sumY <= 4096, "mean of Y (orders 2/2)");
      check(sumY1 - 2000 * xv <= 2048 && 2000 * xv - sumY1 <= 2048, "mean of Y (orders 1/1)");
    end
    do_reset();
    for (int n = 0; n < 4000; n++) step(int'($urandom_range(0, 255)));
    check(n_ovl1 > 0 && n_ovl2 > 0, "both stages clamped at least once");
    check(n_ident > 10000, "cancellation identity checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
