// rfft_stage: one stage of the single-path delay-feedback FFT pipeline. It
// holds a delay line of D = 2**LD samples, the coefficient and address
// generator and the arithmetic element, and registers its output. Every
// enable moves one sample in and one sample out; the output stream lags the
// input stream by D + 1 samples.
module rfft_stage
  import mcd_pkg::*;
#(
  parameter int LD = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic [LD:0] offset,
  input  logic        en,
  input  cplx_t       din,
  output cplx_t       dout
);
  localparam int D  = 1 << LD;
  localparam int PW = (LD > 0) ? LD : 1;

  cplx_t          dl [D];
  logic [PW-1:0]  ptr;
  logic           bfly;
  logic [LD:0]    pos;
  cplx_t          w, a, fb, res;

  fft_coef_gen #(.LD(LD)) u_coef (
    .clk, .rst_n, .clear, .offset, .en, .bfly, .pos, .w
  );

  assign a = dl[ptr];

  mae u_mae (.bfly, .a, .b(din), .w, .out(res), .fb);

  always_ff @(posedge clk) begin
    if (en) dl[ptr] <= fb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr  <= '0;
      dout <= '0;
    end else if (clear) begin
      ptr  <= '0;
    end else if (en) begin
      ptr  <= (LD > 0) ? ptr + 1'b1 : '0;
      dout <= res;
    end
  end
endmodule
