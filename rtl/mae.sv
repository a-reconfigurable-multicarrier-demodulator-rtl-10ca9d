// mae: multiplexed arithmetic element of the pipelined FFT. One radix-2
// butterfly position of a single-path delay-feedback pipeline: the same
// adder, subtractor and complex multiplier serve the two halves of each
// block. With bfly high (second half of a block) it forms (a+b)/2 for the
// next stage and (a-b)/2 for the feedback delay line. With bfly low (first
// half) it passes the delay-line output a, multiplied by the twiddle w, to
// the next stage and sends the new input b into the delay line.
// That the butterfly is done by a multiplexed arithmetic element is the
// document's; the delay-feedback arrangement, the halving in every
// butterfly (against overflow) and the Q1.14 twiddles are this design's.
// Purely combinational; the stage registers its output.
module mae
  import mcd_pkg::*;
(
  input  logic  bfly,    // 1: butterfly half, 0: twiddle half
  input  cplx_t a,       // delay-line output
  input  cplx_t b,       // stage input
  input  cplx_t w,       // twiddle, Q1.14
  output cplx_t out,     // to the next stage
  output cplx_t fb       // into the delay line
);
  logic signed [W:0]    s_re, s_im, d_re, d_im;
  logic signed [2*W:0]  p_re, p_im;

  always_comb begin
    s_re = {a.re[W-1], a.re} + {b.re[W-1], b.re};
    s_im = {a.im[W-1], a.im} + {b.im[W-1], b.im};
    d_re = {a.re[W-1], a.re} - {b.re[W-1], b.re};
    d_im = {a.im[W-1], a.im} - {b.im[W-1], b.im};
    p_re = (2*W+1)'(a.re * w.re) - (2*W+1)'(a.im * w.im);
    p_im = (2*W+1)'(a.re * w.im) + (2*W+1)'(a.im * w.re);
    if (bfly) begin
      out = '{re: s_re[W:1], im: s_im[W:1]};
      fb  = '{re: d_re[W:1], im: d_im[W:1]};
    end else begin
      out = '{re: sat16(40'(p_re >>> CFRAC)), im: sat16(40'(p_im >>> CFRAC))};
      fb  = b;
    end
  end
endmodule
