// mcd_top: reconfigurable multicarrier demodulator for an SCPC/FDMA uplink.
// The quadrature-sampled FDMA band enters the reconfigurable
// transmultiplexer (rtmux), which separates it into channels in one of
// three cases: 800 x 64 kb/s (module 2, 1024-point), 24 x 2.048 Mb/s
// (module 3, 32-point), or the mix of 400 x 64 kb/s and 12 x 2.048 Mb/s
// (module 1 splits the band, modules 2 and 3 run at half size). Each
// channelizing module feeds a programmable demodulator (prodem) that
// recovers carrier phase, symbol timing and data for all its channels in
// time-shared hardware and leaves the bits in its data RAM, whose read port
// is brought out for the baseband switch that follows.
// The transmultiplexer/demodulator split, the three cases and the module
// structure are the document's; one demodulator per channelizing module
// (the document describes a single shared one) is this design's choice, so
// that both halves of case 2 are demodulated at once.
// Input rate: a filter bank needs M*K + 2 cycles per block of M samples,
// so the input must stay below one sample per K cycles in cases 1 and 3
// and below two per K cycles in case 2 (one sample every K+1 cycles, resp.
// two every K+1, is safe); overflow flags a faster input. A change of mode
// restarts the channelizers at once; the demodulators keep running, so the
// interval that spans the change holds mixed data.
module mcd_top
  import mcd_pkg::*;
#(
  parameter int LOG_M2   = 10,
  parameter int LOG_M3   = 5,
  parameter int K        = 8,
  parameter int LOG_LSYM = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  mcd_case_e           mode,
  input  logic                in_valid,
  input  cplx_t               in_data,
  output logic                overflow,
  // narrowband (module 2) demodulator
  input  logic                a_rd_bank,
  input  logic [LOG_M2-1:0]   a_rd_ch,
  input  logic [LOG_LSYM-1:0] a_rd_sym,
  output logic [1:0]          a_rd_bits,
  output logic                a_done,
  output logic                a_done_bank,
  output logic                a_overrun,
  output logic                a_ph_valid,
  output logic                a_ted_valid,
  // wideband (module 3) demodulator
  input  logic                b_rd_bank,
  input  logic [LOG_M3-1:0]   b_rd_ch,
  input  logic [LOG_LSYM-1:0] b_rd_sym,
  output logic [1:0]          b_rd_bits,
  output logic                b_done,
  output logic                b_done_bank,
  output logic                b_overrun,
  output logic                b_ph_valid,
  output logic                b_ted_valid
);
  logic              ch2_valid, ch2_last, ch3_valid, ch3_last;
  cplx_t             ch2_data, ch3_data;
  logic [LOG_M2-1:0] ch2_bin;
  logic [LOG_M3-1:0] ch3_bin;

  rtmux #(.LOG_M2(LOG_M2), .LOG_M3(LOG_M3), .K(K)) u_rtmux (
    .clk, .rst_n, .mode, .in_valid, .in_data,
    .ch2_valid, .ch2_data, .ch2_bin, .ch2_last,
    .ch3_valid, .ch3_data, .ch3_bin, .ch3_last, .overflow
  );

  prodem #(.LOG_NCH(LOG_M2), .LOG_LSYM(LOG_LSYM)) u_prodem_a (
    .clk, .rst_n, .in_valid(ch2_valid), .in_ch(ch2_bin), .in_last(ch2_last),
    .in_data(ch2_data), .rd_bank(a_rd_bank), .rd_ch(a_rd_ch), .rd_sym(a_rd_sym),
    .rd_bits(a_rd_bits), .done(a_done), .done_bank(a_done_bank),
    .overrun(a_overrun), .ph_valid(a_ph_valid), .ted_valid(a_ted_valid)
  );

  prodem #(.LOG_NCH(LOG_M3), .LOG_LSYM(LOG_LSYM)) u_prodem_b (
    .clk, .rst_n, .in_valid(ch3_valid), .in_ch(ch3_bin), .in_last(ch3_last),
    .in_data(ch3_data), .rd_bank(b_rd_bank), .rd_ch(b_rd_ch), .rd_sym(b_rd_sym),
    .rd_bits(b_rd_bits), .done(b_done), .done_bank(b_done_bank),
    .overrun(b_overrun), .ph_valid(b_ph_valid), .ted_valid(b_ted_valid)
  );
endmodule
