// Spike-to-analog Sigma-Delta MASH DAC, digital part.
//
// A digital neuron reports a signal as the rate of its tonic spikes. This
// top turns such a spike train back into the drive signals of a small analog
// back end:
//   rate_gen            one-cycle enables: modulator tick (clk/TICK_DIV) and
//                       sample strobe (every OSR ticks)
//   spike_rate_decoder  spike count per sample window -> SAMPLE_W-bit sample
//   mash_modulator      stage 1: 1-bit truncation, loop order ORDER1
//                       stage 2: STAGE2_BITS-bit truncation of the stage-1
//                       error, loop order ORDER2
//   thermometer_decoder stage-2 code -> seven switch lines A..G
// The sample is held for OSR ticks (zero-order-hold oversampling).
//
// Off chip, dac1_out drives the stage-1 branch, therm_out the seven branches
// of the thermometer DAC, whose output is high-pass filtered twice (the
// (1-z^-1)^2 error-cancellation path), added to stage 1 and low-pass filtered.
// dac2_msb_out is the stage-2 MSB alone, for the variant that uses a 1-bit DAC
// in stage 2. The structure and the 1-bit/3-bit split follow the published
// converter; all rates, widths and the pipeline alignment are this design's.
//
// Timing: a sample is available one clock after its sample strobe and is
// loaded into the modulator at that point; the modulator picks it up at the
// next tick. dac1_out and therm_out are registered, aligned with each other,
// and change one clock after a tick; a sample reaches them three ticks after
// the modulator first uses it.
module sd_mash_dac_top #(
  parameter int unsigned TICK_DIV    = 50,
  parameter int unsigned OSR         = 100,
  parameter int unsigned SAMPLE_W    = 8,
  parameter int unsigned ORDER1      = 2,
  parameter int unsigned ORDER2      = 2,
  parameter int unsigned STAGE2_BITS = 3
) (
  input  logic                          clk,
  input  logic                          rst_n,  // synchronous, active low
  input  logic                          spike_in,
  output logic                          dac1_out,
  output logic [(1<<STAGE2_BITS)-2:0]   therm_out,
  output logic                          dac2_msb_out,
  output logic [SAMPLE_W-1:0]           sample,
  output logic                          sample_valid,
  output logic                          sample_sat,
  output logic                          tick,
  output logic                          stage1_ovl,
  output logic                          stage2_ovl,
  output logic                          err_sat
);
  logic                   sample_stb;
  logic [SAMPLE_W-1:0]    x_hold;
  logic                   q1;
  logic [STAGE2_BITS-1:0] q2;

  rate_gen #(.TICK_DIV(TICK_DIV), .OSR(OSR)) u_rate (
    .clk(clk), .rst_n(rst_n), .tick(tick), .sample_stb(sample_stb)
  );

  spike_rate_decoder #(.SAMPLE_W(SAMPLE_W)) u_dec (
    .clk(clk), .rst_n(rst_n), .spike_in(spike_in), .sample_stb(sample_stb),
    .sample(sample), .sample_valid(sample_valid), .saturated(sample_sat)
  );

  // Zero-order hold: the modulator sees the latest sample for OSR ticks.
  always_ff @(posedge clk) begin
    if (!rst_n)            x_hold <= '0;
    else if (sample_valid) x_hold <= sample;
  end

  mash_modulator #(
    .SAMPLE_W(SAMPLE_W), .ORDER1(ORDER1), .ORDER2(ORDER2), .STAGE2_BITS(STAGE2_BITS)
  ) u_mash (
    .clk(clk), .rst_n(rst_n), .en(tick), .x(x_hold),
    .q1(q1), .q2(q2), .ovl1(stage1_ovl), .ovl2(stage2_ovl), .esat(err_sat)
  );

  thermometer_decoder #(.BITS(STAGE2_BITS)) u_therm (
    .clk(clk), .rst_n(rst_n), .en(tick), .code(q2), .therm(therm_out)
  );

  // Output registers matching the thermometer decoder's, so that the GPIO
  // bit and the thermometer lines switch on the same edge.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dac1_out     <= 1'b0;
      dac2_msb_out <= 1'b0;
    end else if (tick) begin
      dac1_out     <= q1;
      dac2_msb_out <= q2[STAGE2_BITS-1];
    end
  end
endmodule
