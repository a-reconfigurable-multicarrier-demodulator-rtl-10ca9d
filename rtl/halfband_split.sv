// halfband_split: module 1 of the transmultiplexer. In case 2 the FDMA band
// holds two carriers groups, each filling half of the spectrum; this block
// separates them. The lower half (centred at -fs/4) is shifted up by fs/4 by
// multiplying with j^n, the upper half (centred at +fs/4) is shifted down with
// (-j)^n. Both products are low-pass filtered by the 7-tap half-band filter
// h = [-1 0 9 16 9 0 -1]/32 and decimated by two. The mixing by powers of j
// needs only swaps and negations, the filter only shifts and adds.
// That module 1 splits the band in two halves is the document's; the mixer,
// filter and its taps are this design's own choices.
// Interface: one input sample per in_valid; after every second input both
// outputs present a sample (lo_valid = hi_valid) on the next cycle.
module halfband_split
  import mcd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t lo_data,
  output cplx_t hi_data
);
  localparam int NT = 7;
  localparam int signed H [NT] = '{-1, 0, 9, 16, 9, 0, -1};

  logic [1:0] n;                 // sample index modulo 4
  cplx_t      lo_dl [NT];        // delay lines of the mixed samples, [0] newest
  cplx_t      hi_dl [NT];
  cplx_t      lo_mix, hi_mix;

  // x * j^n and x * (-j)^n
  always_comb begin
    unique case (n)
      2'd0: begin lo_mix = in_data;                          hi_mix = in_data; end
      2'd1: begin lo_mix = '{re: -in_data.im, im: in_data.re}; hi_mix = '{re: in_data.im, im: -in_data.re}; end
      2'd2: begin lo_mix = '{re: -in_data.re, im: -in_data.im}; hi_mix = '{re: -in_data.re, im: -in_data.im}; end
      default: begin lo_mix = '{re: in_data.im, im: -in_data.re}; hi_mix = '{re: -in_data.im, im: in_data.re}; end
    endcase
  end

  // Filter sums over the delay line including the new sample.
  logic signed [31:0] lo_re, lo_im, hi_re, hi_im;
  always_comb begin
    lo_re = H[0] * lo_mix.re; lo_im = H[0] * lo_mix.im;
    hi_re = H[0] * hi_mix.re; hi_im = H[0] * hi_mix.im;
    for (int t = 1; t < NT; t++) begin
      lo_re += H[t] * lo_dl[t-1].re;
      lo_im += H[t] * lo_dl[t-1].im;
      hi_re += H[t] * hi_dl[t-1].re;
      hi_im += H[t] * hi_dl[t-1].im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n         <= '0;
      out_valid <= 1'b0;
      lo_data   <= '0;
      hi_data   <= '0;
      for (int t = 0; t < NT; t++) begin
        lo_dl[t] <= '0;
        hi_dl[t] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        n        <= n + 2'd1;
        lo_dl[0] <= lo_mix;
        hi_dl[0] <= hi_mix;
        for (int t = 1; t < NT; t++) begin
          lo_dl[t] <= lo_dl[t-1];
          hi_dl[t] <= hi_dl[t-1];
        end
        if (n[0]) begin
          out_valid  <= 1'b1;
          lo_data.re <= sat16(40'(lo_re >>> 5));
          lo_data.im <= sat16(40'(lo_im >>> 5));
          hi_data.re <= sat16(40'(hi_re >>> 5));
          hi_data.im <= sat16(40'(hi_im >>> 5));
        end
      end
    end
  end
endmodule
