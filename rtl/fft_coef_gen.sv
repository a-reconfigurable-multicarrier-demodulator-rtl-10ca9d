// fft_coef_gen: programmable coefficient and address generator for one
// stage of the reconfigurable FFT. A position counter tracks where in its
// 2*D-sample block (D = 2**LD) the stage is; it is loaded with a start
// offset on clear, so the same stage can sit at a different depth of the
// pipeline when the FFT is reconfigured, and advances on every enable. The
// counter's top bit selects the butterfly half, the lower bits address a
// table of W = exp(-j*2*pi*i/(2*D)), i = 0..D-1, held as Q1.14.
// The document names the programmable coefficient and address generator;
// the counter-plus-table form is this design's.
// Timing: bfly, addr and w follow the counter combinationally.
module fft_coef_gen
  import mcd_pkg::*;
#(
  parameter int LD = 3                 // log2 of the stage delay D
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,           // load the counter with offset
  input  logic [LD:0] offset,
  input  logic        en,              // advance one sample
  output logic        bfly,            // second half of the block
  output logic [LD:0] pos,             // position within the block
  output cplx_t       w                // twiddle for this position
);
  localparam int D = 1 << LD;
  cplx_t rom [D];

  function automatic logic signed [W-1:0] q14(input real v);
    real s;
    s = v * 16384.0;
    return (s >= 0.0) ? W'($rtoi(s + 0.5)) : W'(-$rtoi(-s + 0.5));
  endfunction

  initial begin
    for (int i = 0; i < D; i++) begin
      rom[i].re = q14($cos(6.283185307179586 * i / (2.0 * D)));
      rom[i].im = q14(-$sin(6.283185307179586 * i / (2.0 * D)));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     pos <= '0;
    else if (clear) pos <= offset;
    else if (en)    pos <= pos + 1'b1;
  end

  assign bfly = pos[LD];
  if (LD == 0) begin : g_unit
    assign w = rom[0];
  end else begin : g_rom
    assign w = rom[pos[LD-1:0]];
  end
endmodule
