// tb_interpolator: four interleaved channels with random samples and random
// mu. For each channel the output must be prev + mu*(x - prev)/2**8
// (floored), prev being that channel's previous sample (the sample itself
// for a channel's first sample); the channel and tag travel along.
module tb_interpolator;
  import mcd_pkg::*;
  localparam int LOG_NCH = 2, MUW = 8, TAGW = 3;
  logic clk = 0, rst_n = 1, in_valid = 0, out_valid;
  logic [LOG_NCH-1:0] in_ch = '0, out_ch;
  logic [TAGW-1:0] in_tag = '0, out_tag;
  cplx_t in_data = '0, out_data;
  logic [MUW-1:0] mu = '0;
  int checks = 0, failures = 0;
  int pr [4], pi [4];
  bit seen [4];

  interpolator #(.LOG_NCH(LOG_NCH), .MUW(MUW), .TAGW(TAGW)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; repeat (8) @(negedge clk);
    for (int i = 0; i < 800; i++) begin
      int c, xr, xi, er, ei, a, b;
      c = $urandom_range(0, 3);
      xr = $signed($urandom_range(0, 60000)) - 30000;
      xi = $signed($urandom_range(0, 60000)) - 30000;
      in_ch = 2'(c); in_tag = 3'($urandom); mu = 8'($urandom);
      in_data.re = 16'(xr); in_data.im = 16'(xi); in_valid = 1;
      a = seen[c] ? pr[c] : xr; b = seen[c] ? pi[c] : xi;
      er = (a * 256 + int'(mu) * (xr - a)) >>> 8;
      ei = (b * 256 + int'(mu) * (xi - b)) >>> 8;
      @(negedge clk);
      checks++;
      if (!out_valid || out_data.re != 16'(er) || out_data.im != 16'(ei) ||
          out_ch != in_ch || out_tag != in_tag) begin
        failures++; $display("mismatch at %0d ch %0d", i, c);
      end
      pr[c] = xr; pi[c] = xi; seen[c] = 1;
      in_valid = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
