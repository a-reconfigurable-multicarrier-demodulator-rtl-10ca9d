// tb_rfft: self-checking test of the reconfigurable FFT. Random frames are
// pushed through a 16-point (LOG_N = 4) pipeline in both configurations,
// 16 points with all stages and 8 points with the first stage bypassed,
// with random gaps in in_valid. Every output bin is compared with a
// floating-point DFT divided by the number of points, within a few LSBs.
// The pipeline latency (inputs consumed before the first output) is checked
// against Npoints - 1 + stages.
module tb_rfft;
  import mcd_pkg::*;
  localparam int LOG_N = 4;
  localparam int N = 1 << LOG_N;
  localparam int NFR = 4;

  logic clk = 0, rst_n = 1, half = 0, clear = 0, in_valid = 0;
  cplx_t in_data = '0, out_data;
  logic out_valid, out_last;
  logic [LOG_N-1:0] out_bin;
  int checks = 0, failures = 0;

  rfft #(.LOG_N(LOG_N)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [NFR+2][N], xi [NFR+2][N];
  int fed, first_at, ofr, seen;

  task automatic run(input logic h);
    int np = h ? N/2 : N;
    int exp_lat = (np - 1) + (h ? LOG_N - 1 : LOG_N);
    for (int f = 0; f < NFR + 2; f++)
      for (int i = 0; i < np; i++) begin
        xr[f][i] = $signed($urandom_range(0, 16000)) - 8000;
        xi[f][i] = $signed($urandom_range(0, 16000)) - 8000;
      end
    @(negedge clk); half = h; clear = 1; @(negedge clk); clear = 0;
    fed = 0; first_at = -1; ofr = 0; seen = 0;
    fork
      begin
        for (int f = 0; f < NFR + 2; f++)
          for (int i = 0; i < np; i++) begin
            while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
            in_valid = 1; in_data.re = 16'(xr[f][i]); in_data.im = 16'(xi[f][i]);
            @(negedge clk); fed++;
          end
        in_valid = 0;
      end
      begin
        while (ofr < NFR) begin
          @(posedge clk); #1;
          if (out_valid) begin
            real er, ei;
            int k = out_bin;
            if (first_at < 0) first_at = fed + 1;  // the input taken on this edge counts
            er = 0; ei = 0;
            for (int n = 0; n < np; n++) begin
              real ang = -6.283185307179586 * k * n / np;
              er += xr[ofr][n] * $cos(ang) - xi[ofr][n] * $sin(ang);
              ei += xr[ofr][n] * $sin(ang) + xi[ofr][n] * $cos(ang);
            end
            er /= np; ei /= np;
            checks++;
            if ((out_data.re - er) > 8.0 || (er - out_data.re) > 8.0 ||
                (out_data.im - ei) > 8.0 || (ei - out_data.im) > 8.0) begin
              failures++;
              $display("mismatch half=%0d frame=%0d bin=%0d got %0d,%0d exp %f,%f", h, ofr, k, out_data.re, out_data.im, er, ei);
            end
            seen++;
            if (out_last) begin
              checks++;
              if (seen != np) begin failures++; $display("frame size %0d", seen); end
              seen = 0; ofr++;
            end
          end
        end
      end
    join
    checks++;
    if (first_at != exp_lat) begin
      failures++; $display("latency %0d expected %0d", first_at, exp_lat);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run(1'b0);
    run(1'b1);
    run(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
