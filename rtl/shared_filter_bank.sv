// shared_filter_bank: reconfigurable shared polyphase filter bank, the first
// half of a channelizing module. The input stream is cut into blocks of M
// samples (M = 2**LOG_M, or 2**(LOG_M-1) with half = 1). For every block m
// it computes, for each branch p = 0..M-1,
//   v_p[m] = sum_{k=0}^{K-1} h[k*M + M-1-p] * x[(m-k)*M + p]
// and streams v_0..v_{M-1} to the FFT. A single complex-by-real multiply-
// accumulate unit is shared by all branches and taps (M*K cycles a block),
// which is why the block is called shared. The sample memory holds K+1
// blocks so that a new block can be written while the last K are read.
// The prototype h is a Hamming-windowed sinc of length K*2**LOG_M with cut-
// off pi/2**LOG_M, Q1.14 with unit peak. In the half configuration the
// filter for M/2 branches is taken as every second prototype tap, so one
// coefficient table serves both configurations; this is the programmable
// part of the bank.
// The shared, time-multiplexed, reconfigurable filter bank is the document's;
// the tap count K, the prototype, the memory organisation and the handshake
// are this design's.
// Interface: in_valid/in_ready handshake on the input (in_ready drops while
// a completed block waits for the MAC unit). Outputs come one per
// out_valid, out_first on branch 0. Blocks older than the first one after
// clear count as zero. The input rate must stay at or below one sample per
// K cycles on average for the bank to keep up without stalling.
module shared_filter_bank
  import mcd_pkg::*;
#(
  parameter int LOG_M = 10,     // log2 of the largest number of branches
  parameter int K     = 8       // taps per branch
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  half,
  input  logic  clear,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  output logic  out_valid,
  output logic  out_first,
  output cplx_t out_data
);
  localparam int MMAX = 1 << LOG_M;
  localparam int NS   = K + 1;
  localparam int SW   = $clog2(NS);
  localparam int KW   = (K > 1) ? $clog2(K) : 1;
  localparam int L    = K * MMAX;

  logic signed [CW-1:0] coef [L];
  cplx_t                smem [NS*MMAX];

  function automatic logic signed [CW-1:0] q14(input real v);
    real s;
    s = v * 16384.0;
    return (s >= 0.0) ? CW'($rtoi(s + 0.5)) : CW'(-$rtoi(-s + 0.5));
  endfunction

  // Hamming-windowed sinc; L is even, so t is never 0
  function automatic real proto(input int n);
    real t;
    t = (n - (L - 1) / 2.0) / MMAX;
    return $sin(3.141592653589793 * t) / (3.141592653589793 * t) *
           (0.54 - 0.46 * $cos(6.283185307179586 * n / (L - 1)));
  endfunction

  initial begin
    for (int n = 0; n < L; n++) coef[n] = q14(proto(n));
  end

  // ---------------- write side ----------------
  logic [LOG_M-1:0] wpos;
  logic [SW-1:0]    wslot, newest;
  logic [KW:0]      nblk;            // completed blocks, saturates at K
  logic             pending;
  logic [LOG_M-1:0] mlast;
  assign mlast    = half ? LOG_M'(MMAX/2 - 1) : LOG_M'(MMAX - 1);
  assign in_ready = !pending;

  // ---------------- MAC engine ----------------
  logic             busy;
  logic [LOG_M-1:0] p;
  logic [KW-1:0]    k;
  logic [SW-1:0]    base;
  logic [KW:0]      nuse;
  logic signed [W+CW+$clog2(K+1):0] acc_re, acc_im;
  logic signed [W+CW+$clog2(K+1):0] nre, nim;
  logic             start;
  logic [SW-1:0]    rslot;
  logic [$clog2(L)-1:0] cidx;
  cplx_t            s;
  logic signed [CW-1:0] c;

  assign start = pending && !busy;

  always_comb begin
    rslot = (base >= SW'(k)) ? base - SW'(k) : base + SW'(NS) - SW'(k);
    if (half) cidx = $clog2(L)'(k) * MMAX + $clog2(L)'(MMAX - 2) - ($clog2(L)'(p) << 1);
    else      cidx = $clog2(L)'(k) * MMAX + $clog2(L)'(MMAX - 1) - $clog2(L)'(p);
    s   = ({1'b0, k} < nuse) ? smem[32'(rslot) * MMAX + 32'(p)] : '0;
    c   = coef[cidx];
    nre = s.re * c;
    nim = s.im * c;
    if (k != '0) begin
      nre += acc_re;
      nim += acc_im;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) smem[32'(wslot) * MMAX + 32'(wpos)] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wpos <= '0; wslot <= '0; newest <= '0; nblk <= '0; pending <= 1'b0;
      busy <= 1'b0; p <= '0; k <= '0; base <= '0; nuse <= '0;
      acc_re <= '0; acc_im <= '0;
      out_valid <= 1'b0; out_first <= 1'b0; out_data <= '0;
    end else if (clear) begin
      wpos <= '0; wslot <= '0; nblk <= '0; pending <= 1'b0;
      busy <= 1'b0; out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      // accept a sample
      if (in_valid && in_ready) begin
        if (wpos == mlast) begin
          wpos    <= '0;
          newest  <= wslot;
          wslot   <= (wslot == SW'(NS - 1)) ? '0 : wslot + 1'b1;
          pending <= 1'b1;
          if (nblk != (KW+1)'(K)) nblk <= nblk + 1'b1;
        end else begin
          wpos <= wpos + 1'b1;
        end
      end
      // start a block
      if (start) begin
        busy    <= 1'b1;
        pending <= 1'b0;
        base    <= newest;
        nuse    <= nblk;
        p       <= '0;
        k       <= '0;
      end
      // one multiply-accumulate per cycle
      if (busy) begin
        acc_re <= nre;
        acc_im <= nim;
        if (k == KW'(K - 1)) begin
          k         <= '0;
          out_valid <= 1'b1;
          out_first <= (p == '0);
          out_data.re <= sat16(40'(nre >>> CFRAC));
          out_data.im <= sat16(40'(nim >>> CFRAC));
          if (p == mlast) busy <= 1'b0;
          else            p    <= p + 1'b1;
        end else begin
          k <= k + 1'b1;
        end
      end
    end
  end
endmodule
