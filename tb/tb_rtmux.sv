// tb_rtmux: the transmultiplexer with a 16-point module 2, an 8-point
// module 3 and K = 4, one input sample every 5 cycles.
//   case 1: tone at 3/16 of the sample rate  -> module 2 channel 3
//   case 3: tone at 5/8                      -> module 3 channel 5
//   case 2: tones at -1/8 and +1/8           -> module 2 (8 channels of the
//           lower half) channel 2 and module 3 (4 channels of the upper
//           half) channel 3, both at once through module 1
// In each case the tone channels must carry the tone amplitude (within
// 15 %) and every other channel less than 10 % of it. Each case switch is
// counted; finally samples are pushed every cycle and overflow must rise.
module tb_rtmux;
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
  localparam int LOG_M2 = 4, LOG_M3 = 3, K = 4;
  logic clk = 0, rst_n = 1, in_valid = 0;
  mcd_case_e mode = CASE1;
  cplx_t in_data = '0, ch2_data, ch3_data;
  logic ch2_valid, ch2_last, ch3_valid, ch3_last, overflow;
  logic [LOG_M2-1:0] ch2_bin;
  logic [LOG_M3-1:0] ch3_bin;
  int checks = 0, failures = 0, switches = 0;
  real m2 [16], m3 [8];
  int f2, f3;
  longint n;

  rtmux #(.LOG_M2(LOG_M2), .LOG_M3(LOG_M3), .K(K)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial forever begin
    @(posedge clk); #1;
    if (ch2_valid) begin m2[ch2_bin] = mag(ch2_data); if (ch2_last) f2++; end
    if (ch3_valid) begin m3[ch3_bin] = mag(ch3_data); if (ch3_last) f3++; end
  end
  always @(negedge clk) if (dut.mode != dut.mode_q) switches++;

  task automatic run(input mcd_case_e md, input real fa, input real fb, input int nsamp);
    @(negedge clk); mode = md;
    for (int i = 0; i < nsamp; i++) begin
      cplx_t a, b;
      a = tone(6000.0, fa, n, 0.0);
      b = tone(6000.0, fb, n, 1.0);
      in_data.re = a.re + b.re; in_data.im = a.im + b.im;
      in_valid = 1; @(negedge clk); in_valid = 0; n++;
      repeat (4) @(negedge clk);
    end
  endtask

  task automatic expect_peak(input int which, input int np, input int q);
    for (int b = 0; b < np; b++) begin
      real v;
      v = (which == 2) ? m2[b] : m3[b];
      checks++;
      if (b == q && (v < 5100.0 || v > 6900.0)) begin failures++; $display("module %0d channel %0d: %f", which, b, v); end
      if (b != q && v > 600.0) begin failures++; $display("module %0d leak into %0d: %f", which, b, v); end
    end
  endtask

  initial begin
    n = 0; f2 = 0; f3 = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // case 1 and 3: both tones on the same channel (amplitude 2*6000*cos(0.5))
    run(CASE1, 3.0 / 16, 3.0 / 16, 16 * (K + 6));
    checks++; if (f2 < K + 1) begin failures++; $display("case 1: %0d frames", f2); end
    for (int b = 0; b < 16; b++) m2[b] = m2[b] / 2.0;   // both tones fell in channel 3
    expect_peak(2, 16, 3);
    f3 = 0;
    run(CASE3, 5.0 / 8, 5.0 / 8, 8 * (K + 4));
    checks++; if (f3 < K + 1) begin failures++; $display("case 3: %0d frames", f3); end
    for (int b = 0; b < 8; b++) m3[b] = m3[b] / 2.0;
    expect_peak(3, 8, 5);
    f2 = 0; f3 = 0;
    run(CASE2, -1.0 / 8, 1.0 / 8, 16 * (K + 4));
    checks++; if (f2 < K + 1 || f3 < K + 1) begin failures++; $display("case 2: %0d/%0d frames", f2, f3); end
    expect_peak(2, 8, 2);
    expect_peak(3, 4, 3);
    checks++;
    if (overflow) begin failures++; $display("overflow at the nominal rate"); end
    for (int i = 0; i < 64; i++) begin in_valid = 1; @(negedge clk); end
    in_valid = 0;
    checks++;
    if (!overflow) begin failures++; $display("overflow not flagged"); end
    checks++;
    if (switches != 2) begin failures++; $display("%0d case switches", switches); end
    $display("case switches %0d, overflow %0d", switches, overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
