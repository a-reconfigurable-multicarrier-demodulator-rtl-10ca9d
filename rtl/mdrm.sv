// mdrm: multiplexed data recovery module. For every buffered sample it takes
// the four values the document lists, I and Q from the sample buffer and the
// cosine and sine of the channel's carrier phase from the carrier recovery,
// and derotates the sample: y = x * exp(-j*phi), i.e.
//   y_I = (I*cos + Q*sin) / 2**14,  y_Q = (Q*cos - I*sin) / 2**14.
// The QPSK decision gives two bits, {y_I < 0, y_Q < 0}. The derotated
// sample, the bits and their address are held in the output latch, which
// feeds both the digital data RAM (symbol-instant samples only) and the
// timing recovery (all samples).
// The four inputs, the output latch and its two users are the document's;
// QPSK with Gray-coded sign decisions is this design's.
// Timing: one sample per cycle, one cycle latency.
module mdrm
  import mcd_pkg::*;
#(
  parameter int LOG_NCH = 10,
  parameter int LOG_LS  = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [LOG_NCH-1:0]  in_ch,
  input  logic [LOG_LS-1:0]   in_sidx,
  input  cplx_t               in_data,
  input  logic signed [W-1:0] in_cos,
  input  logic signed [W-1:0] in_sin,
  output logic                out_valid,
  output logic [LOG_NCH-1:0]  out_ch,
  output logic [LOG_LS-1:0]   out_sidx,
  output cplx_t               out_soft,
  output logic [1:0]          out_bits
);
  logic signed [2*W+1:0] yr, yi;
  logic signed [W-1:0]   sr, si;
  always_comb begin
    yr = (2*W+2)'(in_data.re * in_cos) + (2*W+2)'(in_data.im * in_sin);
    yi = (2*W+2)'(in_data.im * in_cos) - (2*W+2)'(in_data.re * in_sin);
    sr = sat16(40'(yr >>> CFRAC));
    si = sat16(40'(yi >>> CFRAC));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_sidx  <= '0;
      out_soft  <= '0;
      out_bits  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_ch      <= in_ch;
        out_sidx    <= in_sidx;
        out_soft.re <= sr;
        out_soft.im <= si;
        out_bits    <= {sr[W-1], si[W-1]};
      end
    end
  end
endmodule
