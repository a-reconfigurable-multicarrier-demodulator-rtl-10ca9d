// tb_fft_coef_gen: a generator with LD = 3 (block of 16) is loaded with an
// offset and stepped with random enables. Its position must follow offset
// plus the number of enables modulo 16, bfly must be the top bit, and the
// twiddle must be exp(-j*2*pi*i/16) for i = position mod 8 within 1 LSB.
module tb_fft_coef_gen;
  import mcd_pkg::*;
  localparam int LD = 3;
  logic clk = 0, rst_n = 1, clear = 0, en = 0, bfly;
  logic [LD:0] offset = '0, pos;
  cplx_t w;
  int checks = 0, failures = 0;

  fft_coef_gen #(.LD(LD)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 5; r++) begin
      offset = 4'($urandom_range(0, 15)); clear = 1; @(negedge clk); clear = 0;
      model = offset;
      for (int i = 0; i < 60; i++) begin
        real er, ei;
        int ii;
        en = 1'($urandom_range(0, 1));
        ii = model % 8;
        er = $cos(6.283185307179586 * ii / 16.0) * 16384.0;
        ei = -$sin(6.283185307179586 * ii / 16.0) * 16384.0;
        checks++;
        if (pos != 4'(model) || bfly != (model >= 8) ||
            w.re - er > 1.0 || er - w.re > 1.0 || w.im - ei > 1.0 || ei - w.im > 1.0) begin
          failures++; $display("pos %0d model %0d w %0d,%0d", pos, model, w.re, w.im);
        end
        @(negedge clk);
        if (en) model = (model + 1) % 16;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
