// channelizer: one reconfigurable channelizing module of the transmultiplexer
// (module 2 or module 3): a shared polyphase filter bank feeding the
// reconfigurable pipelined FFT. With half = 0 it separates 2**LOG_M channels,
// with half = 1 it separates 2**(LOG_M-1) channels from a stream at half the
// rate (one half of the band, coming from module 1). Channel k of the output
// is the input band around k/Npoints of the sample rate, filtered by the
// prototype, decimated by Npoints and scaled by 1/Npoints.
// The filter bank plus FFT structure and the two configurations are the
// document's; sizes and scaling are this design's (see the two sub-blocks).
// Interface: input handshake of the filter bank; output one channel sample
// per out_valid, in the FFT's bit-reversed order, with its channel number in
// out_bin and out_last on the last channel of a frame. clear restarts both
// parts and must be given when half changes.
module channelizer
  import mcd_pkg::*;
#(
  parameter int LOG_M = 10,
  parameter int K     = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             half,
  input  logic             clear,
  input  logic             in_valid,
  output logic             in_ready,
  input  cplx_t            in_data,
  output logic             out_valid,
  output cplx_t            out_data,
  output logic [LOG_M-1:0] out_bin,
  output logic             out_last
);
  logic  fb_valid, fb_first;  // fb_first only documents frame starts
  cplx_t fb_data;

  shared_filter_bank #(.LOG_M(LOG_M), .K(K)) u_fb (
    .clk, .rst_n, .half, .clear, .in_valid, .in_ready, .in_data,
    .out_valid(fb_valid), .out_first(fb_first), .out_data(fb_data)
  );

  rfft #(.LOG_N(LOG_M)) u_fft (
    .clk, .rst_n, .half, .clear, .in_valid(fb_valid), .in_data(fb_data),
    .out_valid, .out_data, .out_bin, .out_last
  );

endmodule
