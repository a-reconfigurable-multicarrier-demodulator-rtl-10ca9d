// mcd_pkg: types and constants shared by the multicarrier demodulator.
// Samples are complex 16-bit two's complement (I in re, Q in im). FFT
// twiddles and filter taps are Q1.14 (16384 = 1.0). The sample width, the
// coefficient format and the case encoding are this design's own choices.
package mcd_pkg;
  localparam int W    = 16;   // sample width (I and Q each)
  localparam int CW   = 16;   // coefficient width
  localparam int CFRAC = 14;  // fractional bits of coefficients

  typedef struct packed {
    logic signed [W-1:0] re;
    logic signed [W-1:0] im;
  } cplx_t;

  // The three demultiplexing cases of the reconfigurable transmultiplexer.
  // CASE1: 800 x 64 kb/s, CASE2: 400 x 64 kb/s plus 12 x 2.048 Mb/s,
  // CASE3: 24 x 2.048 Mb/s.
  typedef enum logic [1:0] {CASE1 = 2'd0, CASE2 = 2'd1, CASE3 = 2'd2} mcd_case_e;

  // Saturate a wider signed value to W bits.
  function automatic logic signed [W-1:0] sat16(input logic signed [39:0] v);
    if (v > 40'sd32767)       return 16'sd32767;
    else if (v < -40'sd32768) return -16'sd32768;
    else                      return v[W-1:0];
  endfunction
endpackage
