// Noise loop filter of a truncation stage (error feedback).
//
// A truncation stage discards the low part of its word; this filter feeds
// that truncation error back so that it leaves the stage shaped by the noise
// transfer function (1 - z^-1)^ORDER, pushing it out of the signal band.
// It keeps the last ORDER errors and forms
//     fb = sum_{k=1..ORDER} (-1)^(k+1) * C(ORDER,k) * e[n-k]
// e.g. fb = e[n-1] for ORDER 1 and fb = 2e[n-1] - e[n-2] for ORDER 2.
// Raising this order is the modification the converter is built around;
// the binomial coefficients and ORDER = 2 are this design's reading of it.
//
// Interface: `err` is the signed error of the current tick and is shifted in
// when `en` is high. `fb` is combinational from the stored errors, so it is
// valid for the next tick's input as soon as the shift has happened.
module noise_loop_filter
  import sd_dac_pkg::*;
#(
  parameter int unsigned ORDER = 2,
  parameter int unsigned ERR_W = 11
) (
  input  logic                           clk,
  input  logic                           rst_n,  // synchronous, active low
  input  logic                           en,
  input  logic signed [ERR_W-1:0]        err,
  output logic signed [ERR_W+ORDER-1:0]  fb
);
  localparam int unsigned FB_W = ERR_W + ORDER;

  logic signed [ERR_W-1:0] hist [ORDER];   // hist[k-1] = e[n-k]

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < ORDER; k++) hist[k] <= '0;
    end else if (en) begin
      hist[0] <= err;
      for (int k = 1; k < ORDER; k++) hist[k] <= hist[k-1];
    end
  end

  always_comb begin
    fb = '0;
    for (int k = 1; k <= ORDER; k++)
      fb = fb + FB_W'(signed'(fb_coef(ORDER, k))) * FB_W'(hist[k-1]);
  end

  initial begin
    assert (ORDER >= 1 && ORDER <= MAX_ORDER)
      else $error("noise_loop_filter: ORDER must be 1..%0d", MAX_ORDER);
  end
endmodule
