// Testbench for rate_gen: measures the spacing of tick and sample_stb.
// Two instances, a small one (TICK_DIV 5, OSR 7) and one at the defaults
// (50, 100). Every tick must follow the previous one by exactly TICK_DIV
// clocks (the first one comes TICK_DIV+1 clocks after reset), sample_stb must only
// come with a tick and exactly every OSR ticks.
module tb_rate_gen;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic tick_a, stb_a, tick_b, stb_b;
  rate_gen #(.TICK_DIV(5), .OSR(7)) dut_a (.clk(clk), .rst_n(rst_n), .tick(tick_a), .sample_stb(stb_a));
  rate_gen dut_b (.clk(clk), .rst_n(rst_n), .tick(tick_b), .sample_stb(stb_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Per-instance monitors: cycles since last tick, ticks since last strobe.
  bit first_a = 1'b1, first_b = 1'b1;
  int cyc_a = 0, tk_a = 0, stbs_a = 0, cyc_b = 0, tk_b = 0, stbs_b = 0;
  always @(posedge clk) if (rst_n) begin
    cyc_a++;
    if (tick_a) begin
      if (first_a) first_a = 1'b0;
      else check(cyc_a == 5, "tick spacing A");
      cyc_a = 0;
      tk_a++;
      if (stb_a) begin
        check(tk_a == 7, "strobe spacing A");
        tk_a = 0;
        stbs_a++;
      end
    end else check(!stb_a, "strobe without tick A");
    cyc_b++;
    if (tick_b) begin
      if (first_b) first_b = 1'b0;
      else check(cyc_b == 50, "tick spacing B");
      cyc_b = 0;
      tk_b++;
      if (stb_b) begin
        check(tk_b == 100, "strobe spacing B");
        tk_b = 0;
        stbs_b++;
      end
    end else check(!stb_b, "strobe without tick B");
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (20010) @(posedge clk);
    check(stbs_a == (20010 - 36) / 35 + 1, "strobe count A");
    check(stbs_b == 4, "strobe count B");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
