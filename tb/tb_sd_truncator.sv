// Testbench for sd_truncator. Two instances:
//   A: the stage-1 form (1-bit output, truncate 8 bits, order 2, 11-bit error)
//   B: a 3-bit output, truncate 5 bits, order 1
// Every tick, all outputs are compared with a reference model that keeps its
// own error history. On top of that, for constant inputs, the mean of
// q*2^SHIFT over 2000 ticks must equal the input within the bound that the
// shaped error allows (the sum of (1-z^-1)^L e telescopes), which checks the
// noise shaping independently of how the model is written. Extreme inputs
// make the output clamp and the error saturate at least once.
module tb_sd_truncator;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [11:0] xa = '0;
  logic signed [9:0]  xb = '0;
  logic        qa;  logic signed [10:0] ea;  logic ovla, esa;
  logic [2:0]  qb;  logic signed [8:0]  eb;  logic ovlb, esb;
  int checks = 0, failures = 0;
  int n_ovl = 0, n_esat = 0, n_mean = 0;

  always #5 clk = ~clk;

  sd_truncator dut_a (.clk(clk), .rst_n(rst_n), .en(en), .x(xa), .q(qa), .err(ea), .ovl(ovla), .esat(esa));
  sd_truncator #(.IN_W(10), .OUT_BITS(3), .SHIFT(5), .ORDER(1), .ERR_W(9)) dut_b (
    .clk(clk), .rst_n(rst_n), .en(en), .x(xb), .q(qb), .err(eb), .ovl(ovlb), .esat(esb));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference state.
  int a1, a2, b1;
  int sum_qa, sum_qb, ticks;
  bit sat_seen;

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    en = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    a1 = 0; a2 = 0; b1 = 0;
    sum_qa = 0; sum_qb = 0; ticks = 0; sat_seen = 1'b0;
  endtask

  // One modulator tick with inputs xa_v and xb_v, compared with the model.
  task automatic step(input int xa_v, input int xb_v);
    int v, q, e, lo, hi;
    bit cl, st;
    @(negedge clk);
    xa = 12'(xa_v);
    xb = 10'(xb_v);
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    // Instance A.
    v = xa_v + 2 * a1 - a2;
    q = (v >= 0) ? v / 256 : -((-v + 255) / 256);
    cl = (q < 0 || q > 1);
    q = (q < 0) ? 0 : (q > 1) ? 1 : q;
    e = v - q * 256;
    lo = -1024; hi = 1023;
    st = (e < lo || e > hi);
    e = (e < lo) ? lo : (e > hi) ? hi : e;
    check(int'(qa) == q, "A q");
    check(int'(ea) == e, "A err");
    check(ovla == cl && esa == st, "A flags");
    a2 = a1; a1 = e;
    sum_qa += q;
    if (cl) n_ovl++;
    if (st) begin n_esat++; sat_seen = 1'b1; end
    // Instance B.
    v = xb_v + b1;
    q = (v >= 0) ? v / 32 : -((-v + 31) / 32);
    cl = (q < 0 || q > 7);
    q = (q < 0) ? 0 : (q > 7) ? 7 : q;
    e = v - q * 32;
    lo = -256; hi = 255;
    st = (e < lo || e > hi);
    e = (e < lo) ? lo : (e > hi) ? hi : e;
    check(int'(qb) == q, "B q");
    check(int'(eb) == e, "B err");
    check(ovlb == cl && esb == st, "B flags");
    b1 = e;
    sum_qb += q;
    if (st) sat_seen = 1'b1;
    ticks++;
  endtask

  initial begin
    int xa_v, xb_v;
    repeat (2) @(negedge clk);
    // Constant inputs: mean of the output equals the input.
    for (int t = 0; t < 12; t++) begin
      xa_v = int'($urandom_range(20, 235));
      xb_v = int'($urandom_range(0, 7 * 32));
      do_reset();
      for (int n = 0; n < 2000; n++) step(xa_v, xb_v);
      if (!sat_seen) begin
        n_mean++;
        // |sum(q*2^S) - N*x| <= 2*max|e| for order 2, max|e| for order 1.
        check((sum_qa * 256 - ticks * xa_v) <= 2048 && (ticks * xa_v - sum_qa * 256) <= 2048, "A mean");
        check((sum_qb * 32 - ticks * xb_v) <= 256 && (ticks * xb_v - sum_qb * 32) <= 256, "B mean");
      end
    end
    // Random and extreme inputs: model match, clamping and saturation.
    do_reset();
    for (int n = 0; n < 3000; n++) begin
      if (n < 1000) xa_v = int'($urandom_range(0, 255));
      else if (n < 2000) xa_v = 1000;
      else xa_v = -300;
      xb_v = int'($urandom_range(0, 511)) - 100;
      step(xa_v, xb_v);
    end
    check(n_mean >= 6, "mean checks ran");
    check(n_ovl > 0, "clamp exercised");
    check(n_esat > 0, "error saturation exercised");
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
