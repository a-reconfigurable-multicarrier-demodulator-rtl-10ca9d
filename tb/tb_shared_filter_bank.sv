// tb_shared_filter_bank: self-checking test of the shared polyphase filter
// bank with 8 branches (LOG_M = 3) and K = 4 taps per branch, in the full
// (8-branch) and half (4-branch) configurations. Random samples are offered
// with random gaps, honouring in_ready. Each branch output is compared with
// sum_k h[k*M+M-1-p] * x[(m-k)*M+p] computed here from the prototype
// formula (Hamming-windowed sinc), within one LSB. The shared MAC unit must
// deliver one branch every K cycles.
module tb_shared_filter_bank;
  import mcd_pkg::*;
  localparam int LOG_M = 3, K = 4, MMAX = 8, L = K * MMAX, NBLK = 7;

  logic clk = 0, rst_n = 1, half = 0, clear = 0, in_valid = 0, in_ready;
  cplx_t in_data = '0, out_data;
  logic out_valid, out_first;
  int checks = 0, failures = 0;

  shared_filter_bank #(.LOG_M(LOG_M), .K(K)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h [L];
  int xr [NBLK][MMAX], xi [NBLK][MMAX];

  function automatic int rnd14(input real v);
    real s = v * 16384.0;
    return (s >= 0.0) ? $rtoi(s + 0.5) : -$rtoi(-s + 0.5);
  endfunction

  task automatic run(input logic hf);
    int m = hf ? MMAX / 2 : MMAX;
    int blk = 0, p = 0, last_t = 0, t = 0;
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < m; i++) begin
        xr[b][i] = $signed($urandom_range(0, 60000)) - 30000;
        xi[b][i] = $signed($urandom_range(0, 60000)) - 30000;
      end
    @(negedge clk); half = hf; clear = 1; @(negedge clk); clear = 0;
    fork
      begin
        for (int b = 0; b < NBLK; b++)
          for (int i = 0; i < m; i++) begin
            in_valid = 1; in_data.re = 16'(xr[b][i]); in_data.im = 16'(xi[b][i]);
            #1; while (!in_ready) @(negedge clk);
            @(negedge clk); in_valid = 0;
            repeat ($urandom_range(0, 6)) @(negedge clk);
          end
      end
      begin
        while (blk < NBLK) begin
          @(posedge clk); #1; t++;
          if (out_valid) begin
            longint ar = 0, ai = 0;
            int er, ei;
            for (int k = 0; k < K; k++) begin
              int ci = hf ? 2 * (k * m + m - 1 - p) : k * m + m - 1 - p;
              if (blk - k >= 0) begin
                ar += longint'(h[ci]) * xr[blk-k][p];
                ai += longint'(h[ci]) * xi[blk-k][p];
              end
            end
            er = int'(ar >>> 14); ei = int'(ai >>> 14);
            if (er > 32767) er = 32767; if (er < -32768) er = -32768;
            if (ei > 32767) ei = 32767; if (ei < -32768) ei = -32768;
            checks++;
            if (out_data.re - er > 1 || er - out_data.re > 1 || out_data.im - ei > 1 || ei - out_data.im > 1) begin
              failures++; $display("blk %0d p %0d got %0d,%0d exp %0d,%0d", blk, p, out_data.re, out_data.im, er, ei);
            end
            checks++;
            if (out_first != (p == 0)) begin failures++; $display("out_first wrong at p %0d", p); end
            if (p > 0) begin
              checks++;
              if (t - last_t != K) begin failures++; $display("branch spacing %0d", t - last_t); end
            end
            last_t = t;
            if (p == m - 1) begin p = 0; blk++; end else p++;
          end
        end
      end
    join
  endtask

  initial begin
    for (int n = 0; n < L; n++) begin
      real tt, sc;
      tt = (n - (L - 1) / 2.0) / MMAX;
      sc = (tt == 0.0) ? 1.0 : $sin(3.141592653589793 * tt) / (3.141592653589793 * tt);
      h[n] = rnd14(sc * (0.54 - 0.46 * $cos(6.283185307179586 * n / (L - 1))));
    end
    repeat (3) @(negedge clk); rst_n = 1;
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
