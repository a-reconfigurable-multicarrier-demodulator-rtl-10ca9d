// tb_mdrm: random samples and phases. The latched output must be the
// sample rotated by -phi, (I*c + Q*s, Q*c - I*s)/2**14 floored and
// saturated, the decision bits must be the signs, and address fields must
// travel with the data, one cycle later. A second part rotates QPSK points
// by a known phase and checks that derotation recovers the transmitted bits.
module tb_mdrm;
  import mcd_pkg::*;
  localparam int LOG_NCH = 4, LOG_LS = 3;
  logic clk = 0, rst_n = 1, in_valid = 0;
  logic [LOG_NCH-1:0] in_ch = '0, out_ch;
  logic [LOG_LS-1:0] in_sidx = '0, out_sidx;
  cplx_t in_data = '0, out_soft;
  logic signed [15:0] in_cos = '0, in_sin = '0;
  logic out_valid;
  logic [1:0] out_bits;
  int checks = 0, failures = 0;

  mdrm #(.LOG_NCH(LOG_NCH), .LOG_LS(LOG_LS)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      int er, ei;
      logic [1:0] tx;
      real ang;
      ang = $urandom_range(0, 4095) * 6.283185307179586 / 4096.0;
      tx = 2'($urandom);
      if (i < 500) begin
        in_data = cplx_t'($urandom);
      end else begin
        // QPSK point (+-A, +-A) rotated by ang
        int ar, ai;
        ar = tx[1] ? -8000 : 8000; ai = tx[0] ? -8000 : 8000;
        in_data.re = 16'($rtoi(ar * $cos(ang) - ai * $sin(ang)));
        in_data.im = 16'($rtoi(ar * $sin(ang) + ai * $cos(ang)));
      end
      in_cos = 16'($rtoi($cos(ang) * 16384.0));
      in_sin = 16'($rtoi($sin(ang) * 16384.0));
      in_ch = 4'($urandom); in_sidx = 3'($urandom); in_valid = 1;
      er = sat((longint'(in_data.re) * in_cos + longint'(in_data.im) * in_sin) >>> 14);
      ei = sat((longint'(in_data.im) * in_cos - longint'(in_data.re) * in_sin) >>> 14);
      @(negedge clk);
      checks++;
      if (!out_valid || out_soft.re != 16'(er) || out_soft.im != 16'(ei) ||
          out_bits != {er < 0, ei < 0} || out_ch != in_ch || out_sidx != in_sidx) begin
        failures++; $display("mismatch at %0d", i);
      end
      if (i >= 500) begin
        checks++;
        if (out_bits != tx) begin failures++; $display("QPSK bits %b sent %b", out_bits, tx); end
      end
    end
    in_valid = 0; @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("out_valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
