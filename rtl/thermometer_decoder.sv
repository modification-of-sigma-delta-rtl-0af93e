// Binary-to-thermometer decoder for the stage-2 thermometer DAC.
//
// The stage-2 DAC is a fully decoded (thermometer) DAC: seven equal current
// branches, each switched by its own FPGA pin, summed by a transimpedance
// amplifier. Code c turns on the first c branches, so every step adds one
// branch and the analog output is monotonic in the code when the branches
// match. Line therm[0] (branch A) is on for c >= 1, ..., therm[6] (branch G)
// for c = 7; which lettered branch takes which threshold is this design's
// choice. LINES = 2^BITS - 1.
//
// Timing: therm is registered and loads `code` in the cycle after en is high,
// so all seven lines switch on the same clock edge.
module thermometer_decoder #(
  parameter int unsigned BITS  = 3,
  parameter int unsigned LINES = (1 << BITS) - 1
) (
  input  logic             clk,
  input  logic             rst_n,   // synchronous, active low
  input  logic             en,
  input  logic [BITS-1:0]  code,
  output logic [LINES-1:0] therm
);
  logic [LINES-1:0] therm_d;

  always_comb begin
    for (int i = 0; i < LINES; i++) therm_d[i] = (int'(code) > i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  therm <= '0;
    else if (en) therm <= therm_d;
  end

  initial begin
    assert (LINES == (1 << BITS) - 1)
      else $error("thermometer_decoder: LINES must be 2^BITS-1");
  end
endmodule
