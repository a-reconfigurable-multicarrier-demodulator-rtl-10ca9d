// tb_mcd_top_full: the demodulator at its default size (1024 + 32 channels,
// K = 8, 16 symbols per interval) in case 1. Two unmodulated carriers on
// channels 100 and 700 with phases pi/4+0.25 and 3*pi/4+0.25 are fed at one
// sample every K+1 cycles. After three completed intervals the data RAM of
// demodulator A must hold 00 and 10 for every symbol of those channels, and
// no overflow or overrun may have occurred.
module tb_mcd_top_full;
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
  localparam int K = 8, LSYM = 16;
  localparam real PI = 3.141592653589793;
  logic clk = 0, rst_n = 1, in_valid = 0;
  mcd_case_e mode = CASE1;
  cplx_t in_data = '0;
  logic overflow;
  logic a_rd_bank = 0, b_rd_bank = 0;
  logic [9:0] a_rd_ch = '0;
  logic [4:0] b_rd_ch = '0;
  logic [3:0] a_rd_sym = '0, b_rd_sym = '0;
  logic [1:0] a_rd_bits, b_rd_bits;
  logic a_done, a_done_bank, a_overrun, a_ph_valid, a_ted_valid;
  logic b_done, b_done_bank, b_overrun, b_ph_valid, b_ted_valid;
  int checks = 0, failures = 0, n_done = 0, n_ph = 0;
  logic last_bank;

  mcd_top dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("timeout after %0d intervals", n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (a_done) begin n_done++; last_bank = a_done_bank; end
    if (a_ph_valid) n_ph++;
  end

  task automatic check_a(input int ch, input logic [1:0] exp_bits);
    for (int j = 0; j < LSYM; j++) begin
      a_rd_bank = last_bank; a_rd_ch = 10'(ch); a_rd_sym = 4'(j); #1;
      checks++;
      if (a_rd_bits != exp_bits) begin
        failures++;
        $display("ch %0d sym %0d: %b expected %b", ch, j, a_rd_bits, exp_bits);
      end
    end
  endtask

  initial begin
    longint n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    while (n_done < 3) begin
      cplx_t a, b;
      a = tone(5000.0, 100.0 / 1024, n, PI / 4 + 0.25);
      b = tone(5000.0, 700.0 / 1024, n, 3 * PI / 4 + 0.25);
      in_data.re = a.re + b.re; in_data.im = a.im + b.im;
      in_valid = 1; @(negedge clk); in_valid = 0; n++;
      repeat (K) @(negedge clk);
    end
    $display("%0d samples, %0d intervals, %0d phase estimates", n, n_done, n_ph);
    check_a(100, 2'b00);
    check_a(700, 2'b10);
    checks++;
    if (overflow || a_overrun) begin failures++; $display("overflow %b overrun %b", overflow, a_overrun); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
