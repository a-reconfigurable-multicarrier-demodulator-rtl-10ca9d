// mcrm: multiplexed carrier recovery module. It estimates, once per
// estimation interval, the carrier phase of every channel, and keeps the
// cosine and sine of that phase for the data recovery. Samples of all
// channels arrive interleaved with their channel number; only symbol-
// instant samples (sym = 1) are used. Each is raised to the fourth power,
// which strips the QPSK modulation, and added into a per-channel
// accumulator memory (cleared by first). On the last symbol of the interval
// the sum goes into a pipelined CORDIC that returns its angle A; the phase
// is phi = (A - pi)/4, in [-pi/4, pi/4). A table of cos/sin indexed by the
// top 10 bits of phi then gives the pair that is written into a two-bank
// phase memory (bank = interval parity) at the channel's address.
// That the MCRM obtains the carrier phase of every channel from serially
// arriving I/Q samples and hands sine and cosine to the MDRM is the
// document's; the fourth-power (Viterbi-and-Viterbi) estimator, QPSK, the
// widths and the table size are this design's.
// Timing: one sample per cycle; the phase of a channel is in the phase
// memory LAT = CORDIC_ITER + 3 cycles after its last sample. Read port:
// combinational, rd_bank/rd_ch -> rd_cos/rd_sin (Q1.14).
module mcrm
  import mcd_pkg::*;
#(
  parameter int LOG_NCH = 10,
  parameter int ITER    = 14
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [LOG_NCH-1:0] in_ch,
  input  logic               in_bank,
  input  logic               in_sym,     // symbol-instant sample
  input  logic               in_first,   // first symbol of the interval
  input  logic               in_last,    // last symbol of the interval
  input  cplx_t              in_data,
  input  logic               rd_bank,
  input  logic [LOG_NCH-1:0] rd_ch,
  output logic signed [W-1:0] rd_cos,
  output logic signed [W-1:0] rd_sin,
  output logic               ph_valid,   // a phase was written this cycle
  output logic [LOG_NCH-1:0] ph_ch,
  output logic [15:0]        ph_angle    // written phase, 2*pi/2**16 units
);
  localparam int NCH = 1 << LOG_NCH;
  localparam int AW  = 24;
  localparam int TW  = LOG_NCH + 1;

  logic signed [AW-1:0] acc_re [NCH];
  logic signed [AW-1:0] acc_im [NCH];
  logic signed [W-1:0]  ph_cos [2*NCH];
  logic signed [W-1:0]  ph_sin [2*NCH];
  logic signed [W-1:0]  cos_tab [1024];
  logic signed [W-1:0]  sin_tab [1024];

  initial begin
    for (int i = 0; i < 1024; i++) begin
      cos_tab[i] = W'($rtoi($floor($cos(6.283185307179586 * i / 1024.0) * 16384.0 + 0.5)));
      sin_tab[i] = W'($rtoi($floor($sin(6.283185307179586 * i / 1024.0) * 16384.0 + 0.5)));
    end
  end

  // fourth power: x2 = x*x, x4 = x2*x2, each rescaled by 2**-15
  logic signed [2*W:0]   sq_re, sq_im;
  logic signed [W+1:0]   x2_re, x2_im;
  logic signed [2*W+4:0] q_re, q_im;
  logic signed [AW-1:0]  x4_re, x4_im, n_re, n_im;
  always_comb begin
    sq_re = (2*W+1)'(in_data.re * in_data.re) - (2*W+1)'(in_data.im * in_data.im);
    sq_im = (2*W+1)'(in_data.re * in_data.im) <<< 1;
    x2_re = (W+2)'(sq_re >>> 15);
    x2_im = (W+2)'(sq_im >>> 15);
    q_re  = (2*W+5)'(x2_re * x2_re) - (2*W+5)'(x2_im * x2_im);
    q_im  = (2*W+5)'(x2_re * x2_im) <<< 1;
    x4_re = AW'(q_re >>> 15);
    x4_im = AW'(q_im >>> 15);
    n_re  = in_first ? x4_re : acc_re[in_ch] + x4_re;
    n_im  = in_first ? x4_im : acc_im[in_ch] + x4_im;
  end

  logic go;
  assign go = in_valid && in_sym;

  always_ff @(posedge clk) begin
    if (go) begin
      acc_re[in_ch] <= n_re;
      acc_im[in_ch] <= n_im;
    end
  end

  logic           cv_valid;
  logic [15:0]    cv_angle;
  logic [TW-1:0]  cv_tag;

  cordic_vec #(.XW(AW), .ITER(ITER), .TAGW(TW)) u_cordic (
    .clk, .rst_n, .in_valid(go && in_last), .in_x(n_re), .in_y(n_im),
    .in_tag({in_bank, in_ch}), .out_valid(cv_valid), .out_angle(cv_angle),
    .out_tag(cv_tag)
  );

  logic [15:0] phi;
  assign phi = 16'($signed(cv_angle - 16'h8000) >>> 2);

  always_ff @(posedge clk) begin
    if (cv_valid) begin
      ph_cos[cv_tag] <= cos_tab[phi[15:6]];
      ph_sin[cv_tag] <= sin_tab[phi[15:6]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_valid <= 1'b0;
      ph_ch    <= '0;
      ph_angle <= '0;
    end else begin
      ph_valid <= cv_valid;
      if (cv_valid) begin
        ph_ch    <= cv_tag[LOG_NCH-1:0];
        ph_angle <= {phi[15:6], 6'b0};
      end
    end
  end

  assign rd_cos = ph_cos[{rd_bank, rd_ch}];
  assign rd_sin = ph_sin[{rd_bank, rd_ch}];
endmodule
