// tb_prodem_timing: timing recovery of the programmable demodulator in
// closed loop. Four channels carry random QPSK with raised-cosine pulses
// (roll-off 1, truncated to +-4 symbols), two samples per symbol, each with
// its own carrier phase and its own sampling offset d (0.1 .. 0.4 symbol):
// sample n of a channel is the waveform at time n/2 + d symbols. The
// interpolator output at the symbol sample lands on the symbol centre when
// its fractional delay is mu = 1 - 2d, while the loop starts at mu = 1/2.
// Linear interpolation at two samples per symbol biases the Gardner
// detector towards mu = 1/2: the loop settles about 25-35 % short of
// 1 - 2d, i.e. within 0.04 symbol of the ideal instant. Checked, after
// 4000 symbols: each channel's mu has covered more than half of the way
// from 1/2 to 1 - 2d and is within 0.1 (0.05 symbol) of it; once the loop
// has settled (the last NLAST intervals) every decided symbol equals the
// transmitted one.
module tb_prodem_timing;
  import mcd_pkg::*;
  localparam int LOG_NCH = 2, NCH = 4, LOG_LSYM = 3, LSYM = 8, NINT = 500, NLAST = 50;
  localparam int NSYM = (NINT + 1) * LSYM + 8;
  localparam real PI = 3.141592653589793;
  logic clk = 0, rst_n = 1, in_valid = 0, in_last = 0;
  logic [LOG_NCH-1:0] in_ch = '0, rd_ch = '0;
  cplx_t in_data = '0;
  logic rd_bank = 0;
  logic [LOG_LSYM-1:0] rd_sym = '0;
  logic [1:0] rd_bits;
  logic done, done_bank, overrun, ph_valid, ted_valid;
  int checks = 0, failures = 0, ndone = 0, nbad = 0;
  logic [1:0] sym [NCH][NSYM];
  real phi [NCH], dly [NCH];

  prodem #(.LOG_NCH(LOG_NCH), .LOG_LSYM(LOG_LSYM)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rc(input real t);
    real den;
    if (t > -1e-9 && t < 1e-9) return 1.0;
    den = 1.0 - 4.0 * t * t;
    if (den > -1e-9 && den < 1e-9) return 0.5;
    return $sin(PI * t) / (PI * t) * $cos(PI * t) / den;
  endfunction

  // data check after every completed interval, counted once settled
  initial begin
    forever begin
      @(posedge clk);
      if (done) begin
        @(negedge clk);
        for (int c = 0; c < NCH; c++)
          for (int j = 0; j < LSYM; j++) begin
            rd_bank = done_bank; rd_ch = 2'(c); rd_sym = 3'(j); #1;
            if (ndone > NINT - NLAST) begin
              checks++;
              if (rd_bits != sym[c][ndone * LSYM + j]) begin
                failures++;
                $display("interval %0d ch %0d sym %0d: %b sent %b", ndone, c, j, rd_bits, sym[c][ndone * LSYM + j]);
              end
            end else if (rd_bits != sym[c][ndone * LSYM + j]) nbad++;
          end
        ndone++;
      end
    end
  end

  initial begin
    for (int c = 0; c < NCH; c++) begin
      int r;
      r = $urandom_range(0, 1200);
      phi[c] = (r - 600) / 1000.0;
      dly[c] = 0.1 * (c + 1);
      for (int k = 0; k < NSYM; k++) sym[c][k] = 2'($urandom);
    end
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (NCH + 2) @(negedge clk);
    for (int n = 0; n < (NINT + 1) * 2 * LSYM; n++)
      for (int c = 0; c < NCH; c++) begin
        real t, ar, ai, p;
        int k0;
        t = n / 2.0 + dly[c];
        k0 = int'(t);
        ar = 0.0; ai = 0.0;
        for (int k = k0 - 4; k <= k0 + 4; k++)
          if (k >= 0 && k < NSYM) begin
            p = rc(t - k);
            ar += (sym[c][k][1] ? -7000.0 : 7000.0) * p;
            ai += (sym[c][k][0] ? -7000.0 : 7000.0) * p;
          end
        in_data.re = 16'($rtoi(ar * $cos(phi[c]) - ai * $sin(phi[c])));
        in_data.im = 16'($rtoi(ar * $sin(phi[c]) + ai * $cos(phi[c])));
        in_ch = 2'(c); in_last = (c == NCH - 1); in_valid = 1;
        @(negedge clk); in_valid = 0;
        @(negedge clk);
      end
    repeat (300) @(negedge clk);
    for (int c = 0; c < NCH; c++) begin
      real mu, want, err, span;
      mu = dut.u_mtrm.tau[c] / 65536.0;
      want = 1.0 - 2.0 * dly[c];
      $display("ch %0d: offset %0.2f symbol, mu %0.3f (ideal %0.3f)", c, dly[c], mu, want);
      checks++;
      err = (mu > want) ? mu - want : want - mu;
      span = (want > 0.5) ? want - 0.5 : 0.5 - want;
      if (err > 0.1 || err > 0.5 * span) begin
        failures++; $display("  timing not acquired");
      end
    end
    $display("%0d intervals, %0d symbol errors before settling", ndone, nbad);
    checks++;
    if (overrun) begin failures++; $display("overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
