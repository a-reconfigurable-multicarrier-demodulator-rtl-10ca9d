// interpolator: channel-multiplexed linear interpolator in front of the
// carrier recovery. Samples of many channels arrive interleaved, each with
// its channel number. For every channel the previous sample is kept in a
// memory; the output is prev + mu*(x - prev), i.e. the signal at the
// fractional time mu (Q0.MUW, 0 <= mu < 1) between the previous and the
// current sample of that channel. mu comes from the timing recovery (MTRM)
// for the channel being processed.
// The document only says that the timing information of the MTRM is used by
// an interpolator; the linear form, the per-channel memory and the absence of
// sample skipping or repeating (mu is limited to one sample interval) are
// this design's. At two samples per symbol the linear form biases the
// timing loop slightly towards mu = 1/2 (a cubic interpolator would not).
// Timing: one cycle from input to output; in_tag travels along unchanged.
// After reset the per-channel memory is cleared in 2**LOG_NCH cycles; no
// sample may arrive before that (the transmultiplexer needs far longer to
// deliver its first frame).
module interpolator
  import mcd_pkg::*;
#(
  parameter int LOG_NCH = 10,
  parameter int MUW     = 8,
  parameter int TAGW    = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [LOG_NCH-1:0] in_ch,
  input  logic [TAGW-1:0]    in_tag,
  input  cplx_t              in_data,
  input  logic [MUW-1:0]     mu,
  output logic               out_valid,
  output logic [LOG_NCH-1:0] out_ch,
  output logic [TAGW-1:0]    out_tag,
  output cplx_t              out_data
);
  localparam int NCH = 1 << LOG_NCH;
  cplx_t prev_mem [NCH];
  logic  seen [NCH];                 // channel has a previous sample
  logic  init;                       // clearing seen[] after reset
  logic [LOG_NCH-1:0] init_ch;
  cplx_t prev;
  logic signed [W+MUW+1:0] yr, yi;

  always_comb begin
    prev = seen[in_ch] ? prev_mem[in_ch] : in_data;
    yr = (W+MUW+2)'(prev.re) * (2**MUW) +
         ($signed({1'b0, mu}) * ((W+MUW+2)'(in_data.re) - (W+MUW+2)'(prev.re)));
    yi = (W+MUW+2)'(prev.im) * (2**MUW) +
         ($signed({1'b0, mu}) * ((W+MUW+2)'(in_data.im) - (W+MUW+2)'(prev.im)));
  end

  always_ff @(posedge clk) begin
    if (in_valid) prev_mem[in_ch] <= in_data;
    if (init)          seen[init_ch] <= 1'b0;
    else if (in_valid) seen[in_ch]   <= 1'b1;
  end

  // After reset the channel memory is cleared one entry per cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init    <= 1'b1;
      init_ch <= '0;
    end else if (init) begin
      init_ch <= init_ch + 1'b1;
      if (init_ch == '1) init <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_tag   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_ch      <= in_ch;
        out_tag     <= in_tag;
        out_data.re <= sat16(40'(yr >>> MUW));
        out_data.im <= sat16(40'(yi >>> MUW));
      end
    end
  end
endmodule
