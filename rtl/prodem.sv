// prodem: programmable demodulator. One set of hardware demodulates every
// channel coming out of the transmultiplexer, channel after channel:
//   interpolator -> MCRM (carrier phase)  \
//                -> MRBS (sample buffer)  -> MDRM (derotate, decide) -> DDR
//                                                      \-> MTRM (timing) -> interpolator
// Each channel sample arrives with its channel number (any order within a
// frame, last one flagged). The controller keeps the sample index within
// the estimation interval (LS = 2*LSYM samples, two samples per symbol). The
// interpolated samples go both to the carrier recovery, which estimates one
// phase per channel and interval, and into the sample buffer. When an
// interval is complete and its phases are known, the controller replays the
// buffered interval through the data recovery, whose output latch feeds the
// digital data RAM and the timing recovery; the timing recovery sets the
// interpolator's fractional delay for each channel. The data of an interval
// is in the data RAM when done pulses (done_bank says where).
// The four modules, their connections and the time-shared operation are the
// document's; QPSK, two samples per symbol, the interval length and the
// replay scheme are this design's.
// Throughput: one sample per cycle on average at most; in practice the
// replay of an interval must end before the next interval is complete,
// else overrun is set.
module prodem
  import mcd_pkg::*;
#(
  parameter int LOG_NCH  = 10,
  parameter int LOG_LSYM = 4,     // log2 of symbols per estimation interval
  parameter int ITER     = 14,
  parameter int MUW      = 8,
  parameter int GSH      = 20
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [LOG_NCH-1:0]  in_ch,
  input  logic                in_last,
  input  cplx_t               in_data,
  input  logic                rd_bank,
  input  logic [LOG_NCH-1:0]  rd_ch,
  input  logic [LOG_LSYM-1:0] rd_sym,
  output logic [1:0]          rd_bits,
  output logic                done,
  output logic                done_bank,
  output logic                overrun,
  output logic                ph_valid,   // MCRM wrote a carrier phase
  output logic                ted_valid   // MTRM made a timing update
);
  localparam int LOG_LS = LOG_LSYM + 1;
  localparam int TAGW   = LOG_LS + 1;

  // ---------------- control
  logic [LOG_LS-1:0]  cur_sidx, rp_sidx;
  logic               cur_bank, rp_valid, rp_bank, rp_done;
  logic [LOG_NCH-1:0] rp_ch;
  logic [LOG_NCH:0]   nch;

  prodem_ctrl #(.LOG_NCH(LOG_NCH), .LOG_LS(LOG_LS), .DRAIN(ITER + 4)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_last, .cur_sidx, .cur_bank,
    .rp_valid, .rp_ch, .rp_sidx, .rp_bank, .rp_done, .nch, .overrun
  );

  // ---------------- interpolator
  logic [MUW-1:0]     mu;
  logic               ip_valid;
  logic [LOG_NCH-1:0] ip_ch;
  logic [TAGW-1:0]    ip_tag;
  cplx_t              ip_data;
  logic [LOG_LS-1:0]  ip_sidx;
  logic               ip_bank;

  interpolator #(.LOG_NCH(LOG_NCH), .MUW(MUW), .TAGW(TAGW)) u_interp (
    .clk, .rst_n, .in_valid, .in_ch, .in_tag({cur_bank, cur_sidx}), .in_data, .mu,
    .out_valid(ip_valid), .out_ch(ip_ch), .out_tag(ip_tag), .out_data(ip_data)
  );
  assign {ip_bank, ip_sidx} = ip_tag;

  // ---------------- carrier recovery
  logic signed [W-1:0] ph_cos, ph_sin;
  logic [LOG_NCH-1:0]  ph_ch;
  logic [15:0]         ph_angle;

  mcrm #(.LOG_NCH(LOG_NCH), .ITER(ITER)) u_mcrm (
    .clk, .rst_n, .in_valid(ip_valid), .in_ch(ip_ch), .in_bank(ip_bank),
    .in_sym(!ip_sidx[0]), .in_first(ip_sidx == '0),
    .in_last(ip_sidx == LOG_LS'((2 << LOG_LSYM) - 2)), .in_data(ip_data),
    .rd_bank(rp_bank), .rd_ch(rp_ch), .rd_cos(ph_cos), .rd_sin(ph_sin),
    .ph_valid, .ph_ch, .ph_angle
  );

  // ---------------- sample buffer
  cplx_t b_data;
  mrbs #(.LOG_NCH(LOG_NCH), .LOG_LS(LOG_LS)) u_mrbs (
    .clk, .wr_en(ip_valid), .wr_bank(ip_bank), .wr_sidx(ip_sidx), .wr_ch(ip_ch),
    .wr_data(ip_data), .rd_en(rp_valid), .rd_bank(rp_bank), .rd_sidx(rp_sidx),
    .rd_ch(rp_ch), .rd_data(b_data)
  );

  // align phase and address with the buffer's output latch
  logic                r_valid, r_bank;
  logic [LOG_NCH-1:0]  r_ch;
  logic [LOG_LS-1:0]   r_sidx;
  logic signed [W-1:0] r_cos, r_sin;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid <= 1'b0; r_bank <= 1'b0; r_ch <= '0; r_sidx <= '0; r_cos <= '0; r_sin <= '0;
    end else begin
      r_valid <= rp_valid;
      r_bank  <= rp_bank;
      r_ch    <= rp_ch;
      r_sidx  <= rp_sidx;
      r_cos   <= ph_cos;
      r_sin   <= ph_sin;
    end
  end

  // ---------------- data recovery
  logic               d_valid;
  logic [LOG_NCH-1:0] d_ch;
  logic [LOG_LS-1:0]  d_sidx;
  cplx_t              d_soft;
  logic [1:0]         d_bits;
  logic               d_bank;

  mdrm #(.LOG_NCH(LOG_NCH), .LOG_LS(LOG_LS)) u_mdrm (
    .clk, .rst_n, .in_valid(r_valid), .in_ch(r_ch), .in_sidx(r_sidx), .in_data(b_data),
    .in_cos(r_cos), .in_sin(r_sin), .out_valid(d_valid), .out_ch(d_ch),
    .out_sidx(d_sidx), .out_soft(d_soft), .out_bits(d_bits)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d_bank <= 1'b0;
    else        d_bank <= r_bank;
  end

  ddr_ram #(.LOG_NCH(LOG_NCH), .LOG_LSYM(LOG_LSYM)) u_ddr (
    .clk, .wr_en(d_valid && !d_sidx[0]), .wr_bank(d_bank), .wr_ch(d_ch),
    .wr_sym(d_sidx[LOG_LS-1:1]), .wr_bits(d_bits),
    .rd_bank, .rd_ch, .rd_sym, .rd_bits
  );

  // ---------------- timing recovery
  logic signed [33:0] ted_err;
  mtrm #(.LOG_NCH(LOG_NCH), .LOG_LS(LOG_LS), .MUW(MUW), .GSH(GSH)) u_mtrm (
    .clk, .rst_n, .in_valid(d_valid), .in_ch(d_ch), .in_sidx(d_sidx), .in_data(d_soft),
    .mu_ch(in_ch), .mu, .ted_valid, .ted_err
  );

  // data of an interval is complete two cycles after the last replay read
  logic [1:0] dn;
  logic [1:0] dn_bank;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dn <= '0; dn_bank <= '0;
    end else begin
      dn      <= {dn[0], rp_done};
      dn_bank <= {dn_bank[0], d_bank};
    end
  end
  assign done      = dn[1];
  assign done_bank = dn_bank[1];
endmodule
