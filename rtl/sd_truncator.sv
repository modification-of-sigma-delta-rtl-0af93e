// Truncation stage with noise-shaping feedback.
//
// Each tick the stage adds the loop-filter correction to its input word,
//     v = x + fb,
// keeps the bits above SHIFT as its output code q (the value the stage's DAC
// converts) and returns what it discarded,
//     e = v - q * 2^SHIFT,
// to the noise loop filter. With fb from noise_loop_filter this gives
//     q * 2^SHIFT = x - (1 - z^-1)^ORDER * e,
// i.e. the truncation error is pushed to high frequencies. The code is
// clamped to the DAC range 0..2^OUT_BITS-1 (`ovl` reports a clamp, after
// which e is larger than one step), and e is saturated to ERR_W signed bits
// (`esat`). Truncation with an error feedback path and the 1-bit and 3-bit
// output widths follow the published converter; the clamp, the saturation and
// all word widths are this design's choices.
//
// Interface: x is signed; q, err, ovl and esat are registered and update in
// the cycle after a cycle with en high, so a stage has one tick of latency.
module sd_truncator #(
  parameter int unsigned IN_W     = 12,
  parameter int unsigned OUT_BITS = 1,
  parameter int unsigned SHIFT    = 8,
  parameter int unsigned ORDER    = 2,
  parameter int unsigned ERR_W    = 11
) (
  input  logic                       clk,
  input  logic                       rst_n,  // synchronous, active low
  input  logic                       en,
  input  logic signed [IN_W-1:0]     x,
  output logic        [OUT_BITS-1:0] q,
  output logic signed [ERR_W-1:0]    err,
  output logic                       ovl,
  output logic                       esat
);
  localparam int unsigned FB_W = ERR_W + ORDER;
  localparam int unsigned VW   = ((IN_W > FB_W) ? IN_W : FB_W) + 2;

  localparam logic signed [VW-1:0] QMAX    = VW'((1 << OUT_BITS) - 1);
  localparam logic signed [VW-1:0] ERR_MAX = VW'((1 << (ERR_W - 1)) - 1);
  localparam logic signed [VW-1:0] ERR_MIN = -VW'(1 << (ERR_W - 1));

  logic signed [FB_W-1:0]  fb;
  logic signed [VW-1:0]    v, qraw, qcl, e;
  logic signed [ERR_W-1:0] e_sat;
  logic                    clamp, sat;

  noise_loop_filter #(.ORDER(ORDER), .ERR_W(ERR_W)) u_lf (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .err  (e_sat),
    .fb   (fb)
  );

  always_comb begin
    v     = VW'(x) + VW'(fb);
    qraw  = v >>> SHIFT;
    clamp = 1'b1;
    if (qraw < 0)         qcl = '0;
    else if (qraw > QMAX) qcl = QMAX;
    else begin
      qcl   = qraw;
      clamp = 1'b0;
    end
    e   = v - (qcl <<< SHIFT);
    sat = 1'b1;
    if (e > ERR_MAX)      e_sat = ERR_MAX[ERR_W-1:0];
    else if (e < ERR_MIN) e_sat = ERR_MIN[ERR_W-1:0];
    else begin
      e_sat = e[ERR_W-1:0];
      sat   = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q    <= '0;
      err  <= '0;
      ovl  <= 1'b0;
      esat <= 1'b0;
    end else if (en) begin
      q    <= qcl[OUT_BITS-1:0];
      err  <= e_sat;
      ovl  <= clamp;
      esat <= sat;
    end
  end
endmodule
