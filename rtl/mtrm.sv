// mtrm: multiplexed timing recovery module. It takes the derotated samples
// of all channels from the data recovery's output latch (two samples per
// symbol: even sample index = symbol instant, odd = midway) and runs one
// Gardner timing-error detector and loop per channel, all channels sharing
// the arithmetic:
//   e = m_I*(p_I - c_I) + m_Q*(p_Q - c_Q)
// where p is the previous symbol sample, m the midway sample and c the
// current symbol sample of that channel. The per-channel timing register
// (16 bits, 0x8000 = half a sample after reset) is advanced by e/2**GSH and
// held within one sample interval. Its top MUW bits are the fractional delay
// mu that the interpolator uses for that channel.
// Extracting timing for the interpolator from the latch in front of the data
// RAM is the document's; the Gardner detector, the first-order loop, the
// gain and the saturation are this design's.
// Timing: state update in the cycle after in_valid; mu read is combinational.
// After reset the channel state is initialised in 2**LOG_NCH cycles, before
// which no sample may arrive.
module mtrm
  import mcd_pkg::*;
#(
  parameter int LOG_NCH = 10,
  parameter int LOG_LS  = 5,
  parameter int MUW     = 8,
  parameter int GSH     = 20
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [LOG_NCH-1:0] in_ch,
  input  logic [LOG_LS-1:0]  in_sidx,
  input  cplx_t              in_data,
  input  logic [LOG_NCH-1:0] mu_ch,
  output logic [MUW-1:0]     mu,
  output logic               ted_valid,  // an error was formed this cycle
  output logic signed [33:0] ted_err
);
  localparam int NCH = 1 << LOG_NCH;
  cplx_t       prev_mem [NCH];
  cplx_t       mid_mem  [NCH];
  logic        have     [NCH];
  logic [15:0] tau      [NCH];
  logic        init;                 // initialising have[] and tau[] after reset
  logic [LOG_NCH-1:0] init_ch;

  logic signed [33:0] e;
  logic signed [34:0] t_new;
  cplx_t p, m;
  always_comb begin
    p = prev_mem[in_ch];
    m = mid_mem[in_ch];
    e = 34'(m.re * (17'(p.re) - 17'(in_data.re))) + 34'(m.im * (17'(p.im) - 17'(in_data.im)));
    t_new = 35'($signed({1'b0, tau[in_ch]})) + 35'(e >>> GSH);
  end

  logic sym;
  assign sym = in_valid && !in_sidx[0];

  always_ff @(posedge clk) begin
    if (in_valid && in_sidx[0]) mid_mem[in_ch] <= in_data;
    if (sym)                    prev_mem[in_ch] <= in_data;
    if (init) begin
      have[init_ch] <= 1'b0;
      tau[init_ch]  <= 16'h8000;
    end else if (sym) begin
      have[in_ch] <= 1'b1;
      if (have[in_ch]) begin
        if (t_new < 0)               tau[in_ch] <= 16'h0000;
        else if (t_new > 35'sd65535) tau[in_ch] <= 16'hFFFF;
        else                         tau[in_ch] <= t_new[15:0];
      end
    end
  end

  // After reset the channel state is initialised one entry per cycle.
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
      ted_valid <= 1'b0;
      ted_err   <= '0;
    end else begin
      ted_valid <= sym && have[in_ch];
      if (sym && have[in_ch]) ted_err <= e;
    end
  end

  assign mu = tau[mu_ch][15 -: MUW];
endmodule
