// rtmux: reconfigurable transmultiplexer. The input demultiplexer sends the
// FDMA sample stream to module 1, 2 or 3 according to the case:
//   case 1 (800 x 64 kb/s):   input -> module 2 (2**LOG_M2-point, full)
//   case 3 (24 x 2.048 Mb/s): input -> module 3 (2**LOG_M3-point, full)
//   case 2 (mix):             input -> module 1, lower half -> module 2 and
//                             upper half -> module 3, both in half size.
// With LOG_M2 = 10 and LOG_M3 = 5 the channel spacing of each module is the
// same in both of its configurations (fs/1024 and fs/32). A change of case
// clears both channelizers. overflow is a sticky flag, set when a sample
// reaches a filter bank that is not ready (the input cannot be stalled).
// The routing of the three cases through modules 1-3 is the document's; the
// FFT sizes follow from its channel counts; the assignment of the lower half
// to the 64 kb/s carriers and the overflow flag are this design's.
module rtmux
  import mcd_pkg::*;
#(
  parameter int LOG_M2 = 10,
  parameter int LOG_M3 = 5,
  parameter int K      = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mcd_case_e         mode,
  input  logic              in_valid,
  input  cplx_t             in_data,
  output logic              ch2_valid,
  output cplx_t             ch2_data,
  output logic [LOG_M2-1:0] ch2_bin,
  output logic              ch2_last,
  output logic              ch3_valid,
  output cplx_t             ch3_data,
  output logic [LOG_M3-1:0] ch3_bin,
  output logic              ch3_last,
  output logic              overflow
);
  logic      m1_valid, m2_valid, m3_valid, hb_valid;
  cplx_t     m1_data, m2_data, m3_data, lo_data, hi_data;
  mcd_case_e mode_q;
  logic      clear, half;
  logic      c2_valid, c3_valid, c2_ready, c3_ready;
  cplx_t     c2_data, c3_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mode_q <= CASE1;
    else        mode_q <= mode;
  end
  assign clear = (mode != mode_q);
  assign half  = (mode == CASE2);

  input_demux u_demux (
    .clk, .rst_n, .mode, .in_valid, .in_data,
    .m1_valid, .m1_data, .m2_valid, .m2_data, .m3_valid, .m3_data
  );

  halfband_split u_mod1 (
    .clk, .rst_n, .in_valid(m1_valid), .in_data(m1_data),
    .out_valid(hb_valid), .lo_data, .hi_data
  );

  assign c2_valid = half ? hb_valid : m2_valid;
  assign c2_data  = half ? lo_data  : m2_data;
  assign c3_valid = half ? hb_valid : m3_valid;
  assign c3_data  = half ? hi_data  : m3_data;

  channelizer #(.LOG_M(LOG_M2), .K(K)) u_mod2 (
    .clk, .rst_n, .half, .clear, .in_valid(c2_valid), .in_ready(c2_ready),
    .in_data(c2_data), .out_valid(ch2_valid), .out_data(ch2_data),
    .out_bin(ch2_bin), .out_last(ch2_last)
  );

  channelizer #(.LOG_M(LOG_M3), .K(K)) u_mod3 (
    .clk, .rst_n, .half, .clear, .in_valid(c3_valid), .in_ready(c3_ready),
    .in_data(c3_data), .out_valid(ch3_valid), .out_data(ch3_data),
    .out_bin(ch3_bin), .out_last(ch3_last)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      overflow <= 1'b0;
    else if ((c2_valid && !c2_ready) || (c3_valid && !c3_ready))
      overflow <= 1'b1;
  end
endmodule
