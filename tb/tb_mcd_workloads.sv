// tb_mcd_workloads: the demodulator at its default size running the two
// wideband configurations: one sample every K+1 = 9 cycles in case 3 and
// every 5 cycles in case 2 (where each channelizer sees half the rate).
//   case 3: 24 unmodulated carriers on channels 0..23 of module 3, carrier c
//           with phase pi/4 + 0.2 + (c mod 4)*pi/2. After three completed
//           intervals demodulator B must hold 00, 10, 11, 01 (for c mod 4 =
//           0, 1, 2, 3) on every symbol of every one of the 24 channels.
//   case 2: carriers on lower-half channels 10 and 300 (of 512) and on
//           upper-half channels 2 and 9 (of 16). Module 1 shifts each
//           carrier's phase by an amount that depends on its frequency, so
//           only the consistency of the decided bits over the 16 symbols of
//           the last interval is checked, in both demodulators.
// No overflow or overrun may occur.
module tb_mcd_workloads;
  import mcd_pkg::*;
  localparam int LSYM = 16;
  localparam real PI = 3.141592653589793;
  logic clk = 0, rst_n = 1, in_valid = 0;
  mcd_case_e mode = CASE3;
  cplx_t in_data = '0;
  logic overflow;
  logic a_rd_bank = 0, b_rd_bank = 0;
  logic [9:0] a_rd_ch = '0;
  logic [4:0] b_rd_ch = '0;
  logic [3:0] a_rd_sym = '0, b_rd_sym = '0;
  logic [1:0] a_rd_bits, b_rd_bits;
  logic a_done, a_done_bank, a_overrun, a_ph_valid, a_ted_valid;
  logic b_done, b_done_bank, b_overrun, b_ph_valid, b_ted_valid;
  int checks = 0, failures = 0, n_da = 0, n_db = 0;
  logic last_a, last_b;
  real rsum, isum;

  mcd_top dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("timeout: intervals A %0d B %0d", n_da, n_db);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (a_done) begin n_da++; last_a = a_done_bank; end
    if (b_done) begin n_db++; last_b = b_done_bank; end
  end

  // one input sample: sum of the carriers f[i], ph[i], amplitude amp
  task automatic put(input real amp, input real f[], input real ph[], input longint n, input int gap);
    rsum = 0.0; isum = 0.0;
    foreach (f[i]) begin
      rsum += amp * $cos(2.0 * PI * f[i] * n + ph[i]);
      isum += amp * $sin(2.0 * PI * f[i] * n + ph[i]);
    end
    in_data.re = 16'($rtoi(rsum)); in_data.im = 16'($rtoi(isum));
    in_valid = 1; @(negedge clk); in_valid = 0;
    repeat (gap - 1) @(negedge clk);
  endtask

  initial begin
    real f3[], p3[], f2[], p2[];
    logic [1:0] exp_bits[4];
    logic [1:0] r;
    int start;
    longint n;
    exp_bits[0] = 2'b00; exp_bits[1] = 2'b10; exp_bits[2] = 2'b11; exp_bits[3] = 2'b01;
    f3 = new[24]; p3 = new[24];
    for (int c = 0; c < 24; c++) begin
      f3[c] = c / 32.0;
      p3[c] = PI / 4 + 0.2 + (c % 4) * PI / 2;
    end
    repeat (2) @(negedge clk); rst_n = 1;
    // case 3
    n = 0; start = n_db;
    while (n_db < start + 3) begin put(1300.0, f3, p3, n, 9); n++; end
    for (int c = 0; c < 24; c++)
      for (int j = 0; j < LSYM; j++) begin
        b_rd_bank = last_b; b_rd_ch = 5'(c); b_rd_sym = 4'(j); #1;
        checks++;
        if (b_rd_bits != exp_bits[c % 4]) begin
          failures++;
          if (j == 0) $display("case 3 ch %0d: %b expected %b", c, b_rd_bits, exp_bits[c % 4]);
        end
      end
    $display("case 3: %0d samples", n);
    // case 2
    f2 = new[4]; p2 = new[4];
    f2[0] = 10.0 / 1024 - 0.25;   p2[0] = 0.3;
    f2[1] = -212.0 / 1024 - 0.25; p2[1] = 1.9;
    f2[2] = 2.0 / 32 + 0.25;      p2[2] = -0.7;
    f2[3] = -7.0 / 32 + 0.25;     p2[3] = 2.6;
    @(negedge clk); mode = CASE2;
    n = 0; start = n_da;
    while (n_da < start + 3) begin put(4000.0, f2, p2, n, 5); n++; end
    $display("case 2: %0d samples, intervals A %0d B %0d", n, n_da, n_db);
    foreach (f2[i]) begin
      int ch;
      ch = (i == 0) ? 10 : (i == 1) ? 300 : (i == 2) ? 2 : 9;
      for (int j = 0; j < LSYM; j++) begin
        if (i < 2) begin
          a_rd_bank = last_a; a_rd_ch = 10'(ch); a_rd_sym = 4'(j); #1; r = a_rd_bits;
          a_rd_sym = 0; #1;
          checks++;
          if (r != a_rd_bits) begin failures++; $display("case 2 A ch %0d sym %0d: %b vs %b", ch, j, r, a_rd_bits); end
        end else begin
          b_rd_bank = last_b; b_rd_ch = 5'(ch); b_rd_sym = 4'(j); #1; r = b_rd_bits;
          b_rd_sym = 0; #1;
          checks++;
          if (r != b_rd_bits) begin failures++; $display("case 2 B ch %0d sym %0d: %b vs %b", ch, j, r, b_rd_bits); end
        end
      end
    end
    checks++;
    if (overflow || a_overrun || b_overrun) begin
      failures++; $display("overflow %b overrun %b %b", overflow, a_overrun, b_overrun);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
