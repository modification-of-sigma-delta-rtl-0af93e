// Modulator tick and sample strobe generator.
//
// The whole converter runs in the system clock domain (50 MHz on the
// reference board). Rather than dividing the clock, this block produces
// one-cycle enables: `tick` every TICK_DIV clocks is the oversampled
// modulator rate, and `sample_stb`, on the last tick of every OSR ticks,
// closes a spike-counting window and starts a new input sample. The input
// sample rate is therefore f_clk / (TICK_DIV * OSR).
//
// OSR values 10, 100 and 1000 are the ones the converter was evaluated with;
// TICK_DIV = 50 (1 MHz modulator rate) is this design's choice.
// Timing: tick (registered) is first high in the (TICK_DIV+1)-th cycle after
// reset is released and then every TICK_DIV cycles; sample_stb coincides with every OSR-th tick.
module rate_gen #(
  parameter int unsigned TICK_DIV = 50,
  parameter int unsigned OSR      = 100
) (
  input  logic clk,
  input  logic rst_n,   // synchronous, active low
  output logic tick,
  output logic sample_stb
);
  localparam int unsigned DW = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;
  localparam int unsigned OW = (OSR > 1) ? $clog2(OSR) : 1;

  logic [DW-1:0] div_cnt;
  logic [OW-1:0] osr_cnt;
  logic          div_wrap;

  assign div_wrap = (div_cnt == DW'(TICK_DIV - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div_cnt    <= '0;
      osr_cnt    <= '0;
      tick       <= 1'b0;
      sample_stb <= 1'b0;
    end else begin
      tick       <= div_wrap;
      sample_stb <= div_wrap && (osr_cnt == OW'(OSR - 1));
      if (div_wrap) begin
        div_cnt <= '0;
        osr_cnt <= (osr_cnt == OW'(OSR - 1)) ? '0 : osr_cnt + 1'b1;
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
    end
  end

  initial begin
    assert (TICK_DIV >= 1) else $error("rate_gen: TICK_DIV must be at least 1");
    assert (OSR >= 1) else $error("rate_gen: OSR must be at least 1");
  end
endmodule
