// tb_mae: random operands for the arithmetic element. In the butterfly half
// the outputs must be floor((a+b)/2) and floor((a-b)/2); in the twiddle
// half out must be floor(a*w / 2**14) (saturated) and fb must equal b.
module tb_mae;
  import mcd_pkg::*;
  logic bfly;
  cplx_t a, b, w, out, fb;
  int checks = 0, failures = 0;

  mae dut (.*);

  function automatic int sat(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  initial begin
    for (int i = 0; i < 2000; i++) begin
      longint pr, pi;
      a = cplx_t'($urandom); b = cplx_t'($urandom); w = cplx_t'($urandom);
      if (i % 3 == 0) begin
        real ang;
        ang = $urandom_range(0, 1023) * 6.283185307179586 / 1024.0;
        w.re = 16'($rtoi($cos(ang) * 16384.0));
        w.im = 16'($rtoi($sin(ang) * 16384.0));
      end
      bfly = 1'b1; #1;
      checks++;
      if (out.re != 16'((int'(a.re) + int'(b.re)) >>> 1) || out.im != 16'((int'(a.im) + int'(b.im)) >>> 1) ||
          fb.re  != 16'((int'(a.re) - int'(b.re)) >>> 1) || fb.im  != 16'((int'(a.im) - int'(b.im)) >>> 1)) begin
        failures++; $display("butterfly mismatch");
      end
      bfly = 1'b0; #1;
      pr = (longint'(a.re) * w.re - longint'(a.im) * w.im) >>> 14;
      pi = (longint'(a.re) * w.im + longint'(a.im) * w.re) >>> 14;
      checks++;
      if (out.re != 16'(sat(pr)) || out.im != 16'(sat(pi)) || fb != b) begin
        failures++; $display("twiddle mismatch");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
