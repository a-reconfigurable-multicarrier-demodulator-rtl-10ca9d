// rfft: reconfigurable pipelined FFT ("N-1/N stage RFFT"). LOG_N radix-2
// single-path delay-feedback stages are chained; stage s has a delay line
// of 2**(LOG_N-1-s) samples. With half = 0 all LOG_N stages run and the
// unit computes a 2**LOG_N point FFT; with half = 1 the first stage (the one
// with the longest delay line) is bypassed and the remaining LOG_N-1 stages
// compute a 2**(LOG_N-1) point FFT. On clear every stage's coefficient and
// address generator is loaded with the block position its input has at
// that pipeline depth, which is how the pipeline is reprogrammed.
// Varying the number of stages and programming the coefficient and address
// generators is the document's scheme; the delay-feedback stage structure,
// the scaling by 1/2 per butterfly (outputs are DFT/Npoints) and the
// enable-driven pipeline are this design's.
// Interface: one input sample per in_valid, frames of Npoints samples in
// natural order, starting right after clear (or reset). The pipeline moves only on
// in_valid. Outputs come in bit-reversed order; out_bin gives the frequency
// bin of each output and out_last marks the last of a frame. An output
// leaves the pipeline with the input sample that arrives sum(D_s+1) samples
// after it entered.
module rfft
  import mcd_pkg::*;
#(
  parameter int LOG_N = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             half,
  input  logic             clear,
  input  logic             in_valid,
  input  cplx_t            in_data,
  output logic             out_valid,
  output cplx_t            out_data,
  output logic [LOG_N-1:0] out_bin,
  output logic             out_last
);
  // Stream offset (in samples) of the input of stage s.
  function automatic int lat(input int s, input logic h);
    int l = 0;
    for (int j = (h ? 1 : 0); j < s; j++) l += (1 << (LOG_N - 1 - j)) + 1;
    return l;
  endfunction

  localparam int LT_FULL = lat(LOG_N, 1'b0);
  localparam int LT_HALF = lat(LOG_N, 1'b1);

  // The first cycle after reset acts as a clear, so the coefficient and
  // address generators start at their configured offsets.
  logic init_q, clr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) init_q <= 1'b1;
    else        init_q <= 1'b0;
  end
  assign clr = clear || init_q;

  cplx_t sin_d [LOG_N];
  cplx_t sout  [LOG_N];

  for (genvar s = 0; s < LOG_N; s++) begin : g_stage
    localparam int LD = LOG_N - 1 - s;
    localparam int OF_FULL = (-lat(s, 1'b0)) & ((2 << LD) - 1);
    localparam int OF_HALF = (-lat(s, 1'b1)) & ((2 << LD) - 1);
    logic [LD:0] offset;
    assign offset = (LD + 1)'(half ? OF_HALF : OF_FULL);
    if (s == 0) begin : g_in0
      assign sin_d[s] = in_data;
    end else if (s == 1) begin : g_in1
      assign sin_d[s] = half ? in_data : sout[0];
    end else begin : g_inn
      assign sin_d[s] = sout[s-1];
    end
    rfft_stage #(.LD(LD)) u_stage (
      .clk, .rst_n, .clear(clr), .offset, .en(in_valid), .din(sin_d[s]), .dout(sout[s])
    );
  end

  // Output bookkeeping: wait until the pipeline is filled, then count
  // output positions within the frame.
  logic [31:0]      fill;
  logic [LOG_N-1:0] opos;
  logic [31:0]      lt_m1;
  logic [LOG_N-1:0] nmask;
  assign lt_m1 = 32'(half ? LT_HALF - 1 : LT_FULL - 1);
  assign nmask = half ? {1'b0, {(LOG_N-1){1'b1}}} : {LOG_N{1'b1}};

  logic [LOG_N-1:0] rev;
  always_comb begin
    for (int i = 0; i < LOG_N; i++) rev[i] = opos[LOG_N-1-i];
    if (half) rev = rev >> 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill      <= '0;
      opos      <= '0;
      out_valid <= 1'b0;
      out_bin   <= '0;
      out_last  <= 1'b0;
    end else if (clr) begin
      fill      <= '0;
      opos      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (fill != lt_m1) begin
          fill <= fill + 1;
        end else begin
          out_valid <= 1'b1;
          out_bin   <= rev;
          out_last  <= (opos == nmask);
          opos      <= (opos + 1'b1) & nmask;
        end
      end
    end
  end

  assign out_data = sout[LOG_N-1];
endmodule
