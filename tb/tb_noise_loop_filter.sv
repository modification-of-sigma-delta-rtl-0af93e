// Testbench for noise_loop_filter. Instances of order 1, 2 (default) and 3
// receive the same random signed error sequence with a random enable. A
// reference keeps its own error history and forms the feedback with the
// coefficients of (1-z^-1)^L written out by hand:
//   L=1: e1    L=2: 2e1 - e2    L=3: 3e1 - 3e2 + e3
// The feedback of every instance is compared after every clock edge, and the
// history must not move while en is low.
module tb_noise_loop_filter;
  localparam int EW = 11;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [EW-1:0] err = '0;
  logic signed [EW:0]   fb1;
  logic signed [EW+1:0] fb2;
  logic signed [EW+2:0] fb3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  noise_loop_filter #(.ORDER(1), .ERR_W(EW)) dut1 (.clk(clk), .rst_n(rst_n), .en(en), .err(err), .fb(fb1));
  noise_loop_filter                          dut2 (.clk(clk), .rst_n(rst_n), .en(en), .err(err), .fb(fb2));
  noise_loop_filter #(.ORDER(3), .ERR_W(EW)) dut3 (.clk(clk), .rst_n(rst_n), .en(en), .err(err), .fb(fb3));

  int h1 = 0, h2 = 0, h3 = 0;  // e[n-1], e[n-2], e[n-3]

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      // Inputs for the coming edge.
      en  = ($urandom_range(0, 3) != 0);
      err = EW'($urandom_range(0, (1 << EW) - 1));
      @(posedge clk);
      if (en) begin
        h3 = h2;
        h2 = h1;
        h1 = int'(err);
      end
      @(negedge clk);
      check(int'(fb1) == h1, "order 1");
      check(int'(fb2) == 2 * h1 - h2, "order 2");
      check(int'(fb3) == 3 * h1 - 3 * h2 + h3, "order 3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
