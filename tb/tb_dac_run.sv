// Reusable end-to-end run of sd_mash_dac_top for one configuration.
//
// Plays NSAMP samples of a sine of F_SIG Hz (at a 50 MHz clock) as tonic
// spike counts and checks what tb_sd_mash_dac_top checks: decoded samples,
// thermometer code, pipeline latency of LAG ticks, and the window mean of the
// ideally recombined output
//   Y = 256*dac1 + 128*(1-z^-1)^ORDER1 t,  t = number of thermometer lines on.
// Mechanisms that a configuration cannot produce are not required: decoder
// saturation needs at least 600 clocks per window, and a first-order 1-bit
// stage never clamps (nor, fed by it, does stage 2). Reports its counts on checks/failures when done is set.
module tb_dac_run #(
  parameter int  TICK_DIV = 50,
  parameter int  OSR      = 100,
  parameter int  ORDER1   = 2,
  parameter int  ORDER2   = 2,
  parameter int  NSAMP    = 700,
  parameter real F_SIG    = 15.0
) (
  output bit done,
  output int checks,
  output int failures
);
  localparam int WIN      = TICK_DIV * OSR;   // clocks per sample
  localparam real FS      = 50.0e6 / WIN;     // sample rate at 50 MHz
  localparam int LAG      = 3;                // ticks from use to output

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic spike_in = 1'b0;
  logic dac1_out, dac2_msb_out, sample_valid, sample_sat, tick;
  logic stage1_ovl, stage2_ovl, err_sat;
  logic [6:0] therm_out;
  logic [7:0] sample;

  always #10 clk = ~clk;   // 50 MHz

  sd_mash_dac_top #(.TICK_DIV(TICK_DIV), .OSR(OSR), .ORDER1(ORDER1), .ORDER2(ORDER2)) dut (
    .clk(clk), .rst_n(rst_n), .spike_in(spike_in),
    .dac1_out(dac1_out), .therm_out(therm_out), .dac2_msb_out(dac2_msb_out),
    .sample(sample), .sample_valid(sample_valid), .sample_sat(sample_sat),
    .tick(tick), .stage1_ovl(stage1_ovl), .stage2_ovl(stage2_ovl), .err_sat(err_sat));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Spike count for sample k: a sine around mid-scale; one window overdriven.
  function automatic int target(input int k);
    if (k == 40 && WIN >= 600) return 300;
    return int'($floor(128.0 + 110.0 * $sin(2.0 * 3.14159265358979 * F_SIG * k / FS) + 0.5));
  endfunction

  int n_valid = 0, n_dsat = 0, n_ovl1 = 0, n_ovl2 = 0, n_esat = 0, n_blocks = 0;
  int k_sent = 0;           // index of the window being generated
  int sent_q[$];            // spike counts sent, oldest first

  // Generator: restarts on every sample_valid.
  initial begin
    int n, sp;
    @(posedge rst_n);
    @(posedge clk iff sample_valid);   // first window is partial: no spikes
    forever begin
      n = target(k_sent);
      sent_q.push_back(n);
      k_sent++;
      sp = (n > 0) ? (WIN - 10) / n : WIN;
      fork
        begin
          for (int i = 0; i < n; i++) begin
            @(negedge clk) spike_in = 1'b1;
            @(negedge clk) spike_in = 1'b0;
            repeat (sp - 2) @(negedge clk);
          end
        end
      join_none
      @(posedge clk iff sample_valid);
    end
  end

  // Decoder check and converted-sample bookkeeping.
  int x_model = 0, first_valid = 1;
  int exp_n;
  always @(posedge clk) if (rst_n && sample_valid) begin
    n_valid++;
    if (sample_sat) n_dsat++;
    if (first_valid) first_valid = 0;
    else if (sent_q.size() > 0) begin
      exp_n = sent_q.pop_front();
      check(int'(sample) == ((exp_n > 255) ? 255 : exp_n), "decoded sample");
      check(sample_sat == (exp_n > 255), "decoder saturation flag");
    end
  end

  // Output side: one entry per tick.
  int xh[$];                // x used by the modulator at each tick
  int th[3];
  int ones, blk_ticks = 0, blk_bad = 0;
  int tick_no = 0, first_x_tick = -1, first_out_tick = -1;
  longint blk_sum = 0, blk_x = 0;
  always @(posedge clk) if (rst_n) begin
    if (tick) begin
      // x_hold loads the cycle after sample_valid; mirror that here.
      xh.push_back(x_model);
      ones = $countones(therm_out);
      check(therm_out == 7'((1 << ones) - 1), "thermometer code");
      th[2] = th[1]; th[1] = th[0]; th[0] = ones;
      // Latency: idle output is q1 = 0, stage-2 code 4 (the offset).
      if (first_x_tick < 0 && x_model != 0) first_x_tick = tick_no;
      if (first_x_tick >= 0 && first_out_tick < 0 && (ones != 4 || dac1_out)) first_out_tick = tick_no;
      tick_no++;
      if (stage1_ovl) n_ovl1++;
      if (stage2_ovl) n_ovl2++;
      if (err_sat) begin n_esat++; blk_bad = 1; end
      if (xh.size() > LAG) begin
        blk_x   += xh.pop_front();
        blk_sum += 256 * int'(dac1_out) +
                   ((ORDER1 == 1) ? 128 * (th[0] - th[1]) : 128 * (th[0] - 2 * th[1] + th[2]));
        blk_ticks++;
        if (blk_ticks == OSR) begin
          if (!blk_bad) begin
            check(blk_sum - blk_x <= 2048 && blk_x - blk_sum <= 2048, "window mean of recombined output");
            n_blocks++;
          end
          blk_ticks = 0; blk_sum = 0; blk_x = 0; blk_bad = 0;
        end
      end
    end
    if (sample_valid) x_model = int'(sample);
  end

  initial begin
    th = '{0, 0, 0};
    done = 1'b0;
    checks = 0;
    failures = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (n_valid >= NSAMP);
    repeat (3) @(negedge clk);
    check(n_blocks > NSAMP / 2, "window checks ran");
    check(first_x_tick >= 0 && first_out_tick - first_x_tick == LAG, "pipeline latency in ticks");
    check(n_valid >= NSAMP, "sample updates");
    if (WIN >= 600) check(n_dsat > 0, "decoder saturation happened");
    if (ORDER1 > 1) check(n_ovl1 > 0, "stage-1 clamp happened");
    if (ORDER1 > 1) check(n_ovl2 > 0, "stage-2 clamp happened");
    $display("OSR %0d orders %0d/%0d: samples=%0d decoder_sat=%0d stage1_clamp=%0d stage2_clamp=%0d err_sat=%0d windows_checked=%0d",
             OSR, ORDER1, ORDER2, n_valid, n_dsat, n_ovl1, n_ovl2, n_esat, n_blocks);
    done = 1'b1;
  end

  initial begin
    repeat ((NSAMP + 5) * WIN) @(posedge clk);
    if (!done) begin
      failures++;
      $display("run watchdog expired");
      done = 1'b1;
    end
  end
endmodule
