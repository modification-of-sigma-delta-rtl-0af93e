// Testbench for spike_rate_decoder. A random spike train (pulses of random
// width and spacing, with a density that changes from window to window)
// feeds a 4-bit instance, which saturates often, and a default 8-bit one.
// A reference model counts rising edges per window up to and including
// the strobe cycle; each published sample, its one-cycle valid strobe and the
// saturation flag are compared with it.
module tb_spike_rate_decoder;
  localparam int WIN = 80;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic spike_in = 1'b0;
  logic sample_stb = 1'b0;
  int   checks = 0, failures = 0;
  int   sat_windows = 0;

  always #5 clk = ~clk;

  logic [3:0] s4;  logic v4, sat4;
  logic [7:0] s8;  logic v8, sat8;
  spike_rate_decoder #(.SAMPLE_W(4)) dut4 (.clk(clk), .rst_n(rst_n), .spike_in(spike_in),
    .sample_stb(sample_stb), .sample(s4), .sample_valid(v4), .saturated(sat4));
  spike_rate_decoder dut8 (.clk(clk), .rst_n(rst_n), .spike_in(spike_in),
    .sample_stb(sample_stb), .sample(s8), .sample_valid(v8), .saturated(sat8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference: edge count of the current window.
  int  ref_cnt = 0;
  bit  ref_prev = 1'b0;
  int  exp_cnt = -1;
  bit  stb_q = 1'b0;
  always @(posedge clk) begin
    if (!rst_n) begin
      ref_cnt = 0; ref_prev = 1'b0; exp_cnt = -1; stb_q = 1'b0;
    end else begin
      // Outputs of the previous strobe are visible now.
      check(v4 == stb_q && v8 == stb_q, "valid strobe");
      if (stb_q) begin
        check(int'(s4) == ((exp_cnt > 15) ? 15 : exp_cnt), "4-bit sample");
        check(sat4 == (exp_cnt > 15), "4-bit saturation flag");
        check(int'(s8) == exp_cnt, "8-bit sample");
        check(!sat8, "8-bit saturation flag");
        if (exp_cnt > 15) sat_windows++;
      end
      if (spike_in && !ref_prev) ref_cnt++;
      ref_prev = spike_in;
      stb_q = sample_stb;
      if (sample_stb) begin
        exp_cnt = ref_cnt;
        ref_cnt = 0;
      end
    end
  end

  // Stimulus, driven on the falling edge.
  initial begin
    int density;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 300; w++) begin
      density = int'($urandom_range(0, 100));
      for (int c = 0; c < WIN; c++) begin
        spike_in   = ($urandom_range(0, 99) < density);
        sample_stb = (c == WIN - 1);
        @(negedge clk);
      end
    end
    sample_stb = 1'b0;
    repeat (3) @(negedge clk);
    check(sat_windows > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
