// tb_mcrm: four channels, each carrying random QPSK symbols rotated by its
// own carrier phase (within +-pi/4) plus a little noise, two samples per
// symbol, 16 symbols per interval, channels interleaved. After each
// interval the phase memory must give cos/sin of that phase within
// 0.015 rad, one phase per channel must be reported (ph_valid) within
// ITER+3 cycles of the channel's last symbol, and the other bank must be
// left alone. Three intervals alternate the banks with new phases.
module tb_mcrm;
  import mcd_pkg::*;
  localparam int LOG_NCH = 2, ITER = 14, NCH = 4, LSYM = 16;
  logic clk = 0, rst_n = 1, in_valid = 0, in_bank = 0, in_sym = 0, in_first = 0, in_last = 0;
  logic [LOG_NCH-1:0] in_ch = '0, rd_ch = '0, ph_ch;
  cplx_t in_data = '0;
  logic rd_bank = 0, ph_valid;
  logic signed [15:0] rd_cos, rd_sin;
  logic [15:0] ph_angle;
  int checks = 0, failures = 0;
  real phi [2][NCH];
  int nph, cyc, last_cyc;

  mcrm #(.LOG_NCH(LOG_NCH), .ITER(ITER)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real falling edge for the asynchronous reset
  always @(posedge clk) begin
    cyc++;
    if (ph_valid) begin
      nph++;
      checks++;
      if (cyc - last_cyc > ITER + 3) begin failures++; $display("phase late: %0d cycles", cyc - last_cyc); end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 3; it++) begin
      int b;
      b = it % 2;
      for (int c = 0; c < NCH; c++) begin
        int r;
        r = $urandom_range(0, 1000);
        phi[b][c] = (r - 500) / 1000.0 * 0.78;
      end
      nph = 0;
      for (int s = 0; s < 2 * LSYM; s++)
        for (int c = 0; c < NCH; c++) begin
          real ar, ai;
          ar = ($urandom_range(0, 1) ? 9000.0 : -9000.0) + $urandom_range(0, 400) - 200.0;
          ai = ($urandom_range(0, 1) ? 9000.0 : -9000.0) + $urandom_range(0, 400) - 200.0;
          in_data.re = 16'($rtoi(ar * $cos(phi[b][c]) - ai * $sin(phi[b][c])));
          in_data.im = 16'($rtoi(ar * $sin(phi[b][c]) + ai * $cos(phi[b][c])));
          in_ch = 2'(c); in_bank = 1'(b); in_sym = (s % 2 == 0);
          in_first = (s == 0); in_last = (s == 2 * LSYM - 2); in_valid = 1;
          @(negedge clk);
          if (in_last) last_cyc = cyc;
          in_valid = 0;
        end
      repeat (ITER + 6) @(negedge clk);
      checks++;
      if (nph != NCH) begin failures++; $display("%0d phases reported", nph); end
      for (int bb = 0; bb <= b && bb < 2; bb++)
        for (int c = 0; c < NCH; c++) begin
          real est;
          rd_bank = 1'(bb); rd_ch = 2'(c); #1;
          est = $atan2(rd_sin, rd_cos);
          checks++;
          if (est - phi[bb][c] > 0.015 || phi[bb][c] - est > 0.015) begin
            failures++; $display("bank %0d ch %0d phase %f expected %f", bb, c, est, phi[bb][c]);
          end
        end
      @(negedge clk);  // back in step with the clock after the reads
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
