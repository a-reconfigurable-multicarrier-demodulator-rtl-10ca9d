// tb_channelizer: a 16-channel module (LOG_M = 4, K = 4) is fed a complex
// tone centred on channel 5 in the full configuration and on channel 3 of 8
// in the half configuration, one sample every K cycles. Once the filter is
// filled, the output of the tone's channel must have the tone's amplitude
// (within 10 %) and every other channel must stay below 3 % of it. Every
// frame must hold all channels once, in bit-reversed order.
module tb_channelizer;
  import mcd_pkg::*;
  // test signal: a*exp(j*(2*pi*f*n + theta)), rounded toward zero
  function automatic cplx_t tone(input real a, input real f, input longint n, input real theta);
    cplx_t x;
    real ang;
    ang = 6.283185307179586 * f * n + theta;
    x.re = 16'($rtoi(a * $cos(ang)));
    x.im = 16'($rtoi(a * $sin(ang)));
    return x;
  endfunction
  function automatic real mag(input cplx_t x);
    return $sqrt(real'(x.re) * x.re + real'(x.im) * x.im);
  endfunction
  localparam int LOG_M = 4, K = 4;
  logic clk = 0, rst_n = 1, half = 0, clear = 0, in_valid = 0, in_ready;
  cplx_t in_data = '0, out_data;
  logic out_valid, out_last;
  logic [LOG_M-1:0] out_bin;
  int checks = 0, failures = 0;
  real m [16];
  int frames, nbin;

  channelizer #(.LOG_M(LOG_M), .K(K)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic h, input int q);
    int np;
    longint n;
    np = h ? 8 : 16;
    @(negedge clk); half = h; clear = 1; @(negedge clk); clear = 0;
    frames = 0; nbin = 0; n = 0;
    fork
      while (frames < K + 4) begin
        in_data = tone(8000.0, real'(q) / np, n, 0.4); in_valid = 1;
        #1; while (!in_ready) @(negedge clk);
        @(negedge clk); in_valid = 0; n++;
        repeat (K - 1) @(negedge clk);
      end
      while (frames < K + 4) begin
        @(posedge clk); #1;
        if (out_valid) begin
          int expbin;
          expbin = 0;
          for (int i = 0; i < LOG_M; i++) expbin[i] = nbin[LOG_M - 1 - i];
          if (h) expbin = expbin >> 1;
          checks++;
          if (out_bin != LOG_M'(expbin)) begin failures++; $display("bin order: %0d expected %0d", out_bin, expbin); end
          m[out_bin] = mag(out_data);
          nbin++;
          if (out_last) begin
            checks++;
            if (nbin != np) begin failures++; $display("frame of %0d", nbin); end
            nbin = 0; frames++;
            if (frames >= K + 2) begin
              for (int b = 0; b < np; b++) begin
                checks++;
                if (b == q && (m[b] < 7200.0 || m[b] > 8800.0)) begin failures++; $display("tone channel %0d: %f", b, m[b]); end
                if (b != q && m[b] > 240.0) begin failures++; $display("leak into channel %0d: %f", b, m[b]); end
              end
            end
          end
        end
      end
    join
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    run(1'b0, 5);
    run(1'b1, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
