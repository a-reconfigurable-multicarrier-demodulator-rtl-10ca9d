// tb_mcd_top: end-to-end test of the multicarrier demodulator at reduced
// size (module 2: 32 channels, module 3: 8 channels, K = 4, 8 symbols per
// interval), one input sample every K+1 cycles.
//   case 1: unmodulated carriers on channels 5 and 12 with phases pi/4+0.3
//           and 3*pi/4+0.3: after carrier recovery the data RAM of
//           demodulator A must hold 00 and 10 for every symbol.
//   case 3: carriers on module 3 channels 2 and 6 (phases pi/4-0.2 and
//           5*pi/4-0.2): demodulator B must hold 00 and 11.
//   case 2: one carrier in each half of the band; both demodulators must
//           deliver intervals with the same bits for every symbol.
//   then:   samples every cycle; overflow must rise.
// Mechanisms counted, each must occur: case switches, module 1 (half-band
// split) outputs, half-size FFT frames, carrier phase estimates and timing
// updates in both demodulators, completed intervals in both, and filter
// bank stalls (in_ready low).
module tb_mcd_top;
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
  localparam int LOG_M2 = 5, LOG_M3 = 3, K = 4, LOG_LSYM = 3, LSYM = 8;
  localparam real PI = 3.141592653589793;
  logic clk = 0, rst_n = 1, in_valid = 0;
  mcd_case_e mode = CASE1;
  cplx_t in_data = '0;
  logic overflow;
  logic a_rd_bank = 0, b_rd_bank = 0;
  logic [LOG_M2-1:0] a_rd_ch = '0;
  logic [LOG_M3-1:0] b_rd_ch = '0;
  logic [LOG_LSYM-1:0] a_rd_sym = '0, b_rd_sym = '0;
  logic [1:0] a_rd_bits, b_rd_bits;
  logic a_done, a_done_bank, a_overrun, a_ph_valid, a_ted_valid;
  logic b_done, b_done_bank, b_overrun, b_ph_valid, b_ted_valid;
  int checks = 0, failures = 0;
  int n_switch = 0, n_hb = 0, n_half = 0, n_pha = 0, n_phb = 0, n_teda = 0, n_tedb = 0;
  int n_donea = 0, n_doneb = 0, n_stall = 0;
  logic last_a_bank, last_b_bank;
  longint n = 0;

  mcd_top #(.LOG_M2(LOG_M2), .LOG_M3(LOG_M3), .K(K), .LOG_LSYM(LOG_LSYM)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (dut.u_rtmux.clear) n_switch++;
      if (dut.u_rtmux.hb_valid) n_hb++;
      if (dut.u_rtmux.ch2_valid && dut.u_rtmux.ch2_last && dut.u_rtmux.half) n_half++;
      if (a_ph_valid) n_pha++;
      if (b_ph_valid) n_phb++;
      if (a_ted_valid) n_teda++;
      if (b_ted_valid) n_tedb++;
      if (a_done) begin n_donea++; last_a_bank = a_done_bank; end
      if (b_done) begin n_doneb++; last_b_bank = b_done_bank; end
      if (!dut.u_rtmux.c2_ready || !dut.u_rtmux.c3_ready) n_stall++;
    end
  end

  // feed carriers until the demodulator has completed 'ndone' more intervals
  task automatic feed(input mcd_case_e md, input real f1, input real p1, input real f2,
                      input real p2, input bit use_b, input int ndone);
    int start;
    @(negedge clk); mode = md;
    start = use_b ? n_doneb : n_donea;
    n = 0;   // the filter bank restarts its frames at a case switch
    while ((use_b ? n_doneb : n_donea) < start + ndone) begin
      cplx_t a, b;
      a = tone(5000.0, f1, n, p1);
      b = tone(5000.0, f2, n, p2);
      in_data.re = a.re + b.re; in_data.im = a.im + b.im;
      in_valid = 1; @(negedge clk); in_valid = 0; n++;
      repeat (K) @(negedge clk);
    end
  endtask

  task automatic check_a(input int ch, input logic [1:0] exp_bits);
    for (int j = 0; j < LSYM; j++) begin
      a_rd_bank = last_a_bank; a_rd_ch = LOG_M2'(ch); a_rd_sym = LOG_LSYM'(j); #1;
      checks++;
      if (a_rd_bits != exp_bits) begin failures++; $display("A ch %0d sym %0d: %b expected %b", ch, j, a_rd_bits, exp_bits); end
    end
  endtask

  task automatic check_b(input int ch, input logic [1:0] exp_bits);
    for (int j = 0; j < LSYM; j++) begin
      b_rd_bank = last_b_bank; b_rd_ch = LOG_M3'(ch); b_rd_sym = LOG_LSYM'(j); #1;
      checks++;
      if (b_rd_bits != exp_bits) begin failures++; $display("B ch %0d sym %0d: %b expected %b", ch, j, b_rd_bits, exp_bits); end
    end
  endtask

  initial begin
    logic [1:0] ref_a, ref_b;
    repeat (2) @(negedge clk); rst_n = 1;
    // case 1
    feed(CASE1, 5.0 / 32, PI / 4 + 0.3, 12.0 / 32, 3 * PI / 4 + 0.3, 1'b0, 3);
    check_a(5, 2'b00);
    check_a(12, 2'b10);
    @(negedge clk);
    // case 3
    feed(CASE3, 2.0 / 8, PI / 4 - 0.2, 6.0 / 8, 5 * PI / 4 - 0.2, 1'b1, 3);
    check_b(2, 2'b00);
    check_b(6, 2'b11);
    @(negedge clk);
    // case 2: lower half channel 3 of 16, upper half channel 3 of 4
    feed(CASE2, 3.0 / 32 - 0.25, 0.5, 0.125, -0.4, 1'b0, 3);
    a_rd_bank = last_a_bank; a_rd_ch = 3; a_rd_sym = 0; #1; ref_a = a_rd_bits;
    b_rd_bank = last_b_bank; b_rd_ch = 3; b_rd_sym = 0; #1; ref_b = b_rd_bits;
    check_a(3, ref_a);
    check_b(3, ref_b);
    @(negedge clk);
    checks++;
    if (overflow) begin failures++; $display("overflow at the nominal rate"); end
    for (int i = 0; i < 200; i++) begin in_valid = 1; @(negedge clk); end
    in_valid = 0;
    checks++;
    if (!overflow) begin failures++; $display("overflow not flagged"); end
    $display("switches %0d, module-1 outputs %0d, half-size FFT frames %0d", n_switch, n_hb, n_half);
    $display("phases A %0d B %0d, timing updates A %0d B %0d, intervals A %0d B %0d, stall cycles %0d",
             n_pha, n_phb, n_teda, n_tedb, n_donea, n_doneb, n_stall);
    checks++; if (n_switch < 2) begin failures++; $display("case switch missing"); end
    checks++; if (n_hb == 0) begin failures++; $display("module 1 never used"); end
    checks++; if (n_half == 0) begin failures++; $display("half-size FFT never used"); end
    checks++; if (n_pha == 0 || n_phb == 0) begin failures++; $display("carrier recovery idle"); end
    checks++; if (n_teda == 0 || n_tedb == 0) begin failures++; $display("timing recovery idle"); end
    checks++; if (n_donea == 0 || n_doneb == 0) begin failures++; $display("no interval completed"); end
    checks++; if (n_stall == 0) begin failures++; $display("no filter bank stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
