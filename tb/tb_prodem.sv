// tb_prodem: end-to-end test of the programmable demodulator with 4
// channels (LOG_NCH = 2), 8 symbols per interval. Every channel carries its
// own random QPSK symbol stream (+-8000 per component), rotated by its own
// carrier phase (within +-0.6 rad), two samples per symbol, laid out so
// that the interpolator's initial half-sample delay lands on the symbols.
// Channels arrive in bit-reversed order, one sample every other cycle.
// After every done pulse all symbols of all channels are read from the data
// RAM bank it names and compared with the transmitted bits. Also checked:
// one carrier phase per channel and interval, timing updates happen, no
// overrun, and the number of completed intervals.
module tb_prodem;
  import mcd_pkg::*;
  localparam int LOG_NCH = 2, NCH = 4, LOG_LSYM = 3, LSYM = 8, NINT = 5;
  logic clk = 0, rst_n = 1, in_valid = 0, in_last = 0;
  logic [LOG_NCH-1:0] in_ch = '0, rd_ch = '0;
  cplx_t in_data = '0;
  logic rd_bank = 0;
  logic [LOG_LSYM-1:0] rd_sym = '0;
  logic [1:0] rd_bits;
  logic done, done_bank, overrun, ph_valid, ted_valid;
  int checks = 0, failures = 0;
  logic [1:0] sym [NCH][(NINT + 1) * LSYM + 1];
  real phi [NCH];
  int nph = 0, nted = 0, ndone = 0;

  prodem #(.LOG_NCH(LOG_NCH), .LOG_LSYM(LOG_LSYM)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (ph_valid) nph++;
    if (ted_valid) nted++;
  end

  // check the data RAM after each completed interval
  initial begin
    forever begin
      @(posedge clk);
      if (done) begin
        @(negedge clk);
        for (int c = 0; c < NCH; c++)
          for (int j = 0; j < LSYM; j++) begin
            rd_bank = done_bank; rd_ch = 2'(c); rd_sym = 3'(j); #1;
            checks++;
            if (rd_bits != sym[c][ndone * LSYM + j]) begin
              failures++; $display("interval %0d ch %0d sym %0d: %b sent %b", ndone, c, j, rd_bits, sym[c][ndone * LSYM + j]);
            end
          end
        ndone++;
      end
    end
  end

  initial begin
    int order [4];
    order[0] = 0; order[1] = 2; order[2] = 1; order[3] = 3;
    for (int c = 0; c < NCH; c++) begin
      int r;
      r = $urandom_range(0, 1200);
      phi[c] = (r - 600) / 1000.0;
      for (int k = 0; k < (NINT + 1) * LSYM + 1; k++) sym[c][k] = 2'($urandom);
    end
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (NCH + 2) @(negedge clk);
    for (int n = 0; n < (NINT + 1) * 2 * LSYM; n++)
      for (int i = 0; i < NCH; i++) begin
        int c, k;
        real ar, ai;
        c = order[i];
        k = (n + 1) / 2;          // x[n] = s[ceil(n/2)]
        ar = sym[c][k][1] ? -8000.0 : 8000.0;
        ai = sym[c][k][0] ? -8000.0 : 8000.0;
        in_data.re = 16'($rtoi(ar * $cos(phi[c]) - ai * $sin(phi[c])));
        in_data.im = 16'($rtoi(ar * $sin(phi[c]) + ai * $cos(phi[c])));
        in_ch = 2'(c); in_last = (i == NCH - 1); in_valid = 1;
        @(negedge clk); in_valid = 0;
        @(negedge clk);
      end
    repeat (300) @(negedge clk);
    checks++;
    if (ndone != NINT + 1) begin failures++; $display("%0d intervals completed", ndone); end
    checks++;
    if (nph != NCH * (NINT + 1)) begin failures++; $display("%0d phases", nph); end
    checks++;
    if (nted == 0) begin failures++; $display("no timing updates"); end
    checks++;
    if (overrun) begin failures++; $display("overrun"); end
    $display("timing updates %0d, phases %0d, intervals %0d", nted, nph, ndone);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
