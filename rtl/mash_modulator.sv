// Two-stage MASH (multi-stage noise shaping) truncation modulator.
//
// Stage 1 truncates the unsigned SAMPLE_W-bit sample to a single bit, the
// value sent out on a GPIO pin that acts as a 1-bit DAC; its noise loop
// filter has order ORDER1. The full sample range 0..2^SAMPLE_W-1 is one
// stage-1 step. Stage 2 re-quantises the stage-1 truncation error e1 with a
// STAGE2_BITS-bit truncator (order ORDER2) whose code drives the thermometer
// DAC. Stage 2 sees e1 + 2^(SAMPLE_W+1), so that its unsigned codes span a
// stage-1 error of -2^(SAMPLE_W+1) .. +2^(SAMPLE_W+1); one stage-2 code step
// is 2^(SAMPLE_W+2-STAGE2_BITS). The constant offset does not reach the output
// because the error-cancellation path is a high-pass.
//
// Error cancellation itself is analog and outside this block: the stage-2
// DAC output is passed through (1 - z^-1)^ORDER1 (two high-pass stages for
// ORDER1 = 2), scaled and added to stage 1, giving ideally
//     Y = q1*2^SAMPLE_W + (1-z^-1)^ORDER1 * q2*2^(SAMPLE_W+2-STAGE2_BITS)
//       = x - (1-z^-1)^(ORDER1+ORDER2) * e2          (no clamping)
// Both stages, the 1-bit/3-bit split and the raised loop order follow the
// published converter; the scaling, the offset and the widths are this
// design's choices.
//
// Stage 2's own error output is left unconnected on purpose: only the
// stage-1 error leaves its stage (as the input of stage 2).
//
// `esat` is high while either stage's error register is saturated, when the
// identity above no longer holds exactly.
//
// Timing: stage 2 works one tick after stage 1 on the registered e1, so q1 is
// delayed by one extra register; q1 and q2 (and ovl1/ovl2/esat) leave aligned, two
// ticks after the sample that produced them.
module mash_modulator #(
  parameter int unsigned SAMPLE_W    = 8,
  parameter int unsigned ORDER1      = 2,
  parameter int unsigned ORDER2      = 2,
  parameter int unsigned STAGE2_BITS = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,  // synchronous, active low
  input  logic                   en,
  input  logic [SAMPLE_W-1:0]    x,
  output logic                   q1,
  output logic [STAGE2_BITS-1:0] q2,
  output logic                   ovl1,
  output logic                   ovl2,
  output logic                   esat   // an error register saturated
);
  localparam int unsigned IN1_W  = SAMPLE_W + 2;
  localparam int unsigned ERR1_W = SAMPLE_W + 3;
  localparam int unsigned IN2_W  = SAMPLE_W + 4;
  localparam int unsigned SHIFT2 = SAMPLE_W + 2 - STAGE2_BITS;
  localparam int unsigned ERR2_W = SHIFT2 + 4;

  logic signed [IN1_W-1:0]  x1;
  logic                     q1_s, ovl1_s;
  logic signed [ERR1_W-1:0] e1;
  logic signed [IN2_W-1:0]  x2;
  logic                     esat1, esat2;

  assign x1 = signed'(IN1_W'(x));
  assign x2 = IN2_W'(e1) + IN2_W'(1 << (SAMPLE_W + 1));

  sd_truncator #(
    .IN_W(IN1_W), .OUT_BITS(1), .SHIFT(SAMPLE_W), .ORDER(ORDER1), .ERR_W(ERR1_W)
  ) u_stage1 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x1),
    .q(q1_s), .err(e1), .ovl(ovl1_s), .esat(esat1)
  );

  sd_truncator #(
    .IN_W(IN2_W), .OUT_BITS(STAGE2_BITS), .SHIFT(SHIFT2), .ORDER(ORDER2), .ERR_W(ERR2_W)
  ) u_stage2 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x2),
    .q(q2), .err(), .ovl(ovl2), .esat(esat2)
  );

  // Alignment register: delays stage 1 by the tick stage 2 lags behind.
  logic esat1_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q1      <= 1'b0;
      ovl1    <= 1'b0;
      esat1_d <= 1'b0;
    end else if (en) begin
      q1      <= q1_s;
      ovl1    <= ovl1_s;
      esat1_d <= esat1;
    end
  end

  assign esat = esat1_d || esat2;

  initial begin
    assert (STAGE2_BITS >= 1 && STAGE2_BITS <= SAMPLE_W)
      else $error("mash_modulator: STAGE2_BITS out of range");
  end
endmodule
