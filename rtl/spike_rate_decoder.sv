// Spike rate decoder: turns a tonic spike train into sample words.
//
// A digital neuron encodes the signal value in its firing rate. This block
// counts the rising edges of spike_in during one sample window (the time
// between two sample_stb pulses) and, on sample_stb, publishes the count as
// the new sample and starts counting again. A spike arriving in the strobe
// cycle belongs to the window being closed. The count saturates at
// 2^SAMPLE_W - 1 and `saturated` reports a window that hit that limit.
// Counting edges, the word width and the saturation are this design's
// choices; the decoder's function, not its circuit, is what is published.
//
// Timing: sample and sample_valid change in the cycle after sample_stb;
// sample_valid is high for that one cycle. spike_in must be synchronous to clk.
module spike_rate_decoder #(
  parameter int unsigned SAMPLE_W = 8
) (
  input  logic                clk,
  input  logic                rst_n,        // synchronous, active low
  input  logic                spike_in,
  input  logic                sample_stb,
  output logic [SAMPLE_W-1:0] sample,
  output logic                sample_valid,
  output logic                saturated
);
  localparam logic [SAMPLE_W-1:0] MAX_CNT = '1;

  logic                spike_d;
  logic                edge_seen;
  logic [SAMPLE_W-1:0] cnt;
  logic                cnt_full;
  logic                sat_flag;

  assign edge_seen = spike_in && !spike_d;
  assign cnt_full  = (cnt == MAX_CNT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      spike_d      <= 1'b0;
      cnt          <= '0;
      sat_flag     <= 1'b0;
      sample       <= '0;
      sample_valid <= 1'b0;
      saturated    <= 1'b0;
    end else begin
      spike_d      <= spike_in;
      sample_valid <= sample_stb;
      if (sample_stb) begin
        sample    <= (edge_seen && !cnt_full) ? cnt + 1'b1 : cnt;
        saturated <= sat_flag || (edge_seen && cnt_full);
        cnt       <= '0;
        sat_flag  <= 1'b0;
      end else if (edge_seen) begin
        if (cnt_full) sat_flag <= 1'b1;
        else          cnt      <= cnt + 1'b1;
      end
    end
  end
endmodule
