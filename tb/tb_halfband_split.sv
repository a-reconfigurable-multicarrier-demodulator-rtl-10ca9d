// tb_halfband_split: checks module 1 in two ways. (1) Random samples: each
// output pair is compared with a reference that mixes by j^n and (-j)^n and
// applies the half-band taps [-1 0 9 16 9 0 -1]/32, and outputs come after
// every second input. (2) Tones: a complex tone at -fs/4 must come out as
// a strong constant on the lower output and be suppressed on the upper, and
// a tone at +fs/4 the other way round.
module tb_halfband_split;
  import mcd_pkg::*;
  logic clk = 0, rst_n = 1, in_valid = 0;
  cplx_t in_data = '0, lo_data, hi_data;
  logic out_valid;
  int checks = 0, failures = 0;

  halfband_split dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hr[$], hi[$], lr[$], li[$];   // mixed sample history
  int tap [7];
  int n, nout;

  function automatic int fl32(input int s);
    return s >>> 5;
  endfunction

  task automatic push(input int re, input int im);
    int mr, mi, ur, ui;
    case (n % 4)
      0: begin mr = re;  mi = im;  ur = re;  ui = im;  end
      1: begin mr = -im; mi = re;  ur = im;  ui = -re; end
      2: begin mr = -re; mi = -im; ur = -re; ui = -im; end
      default: begin mr = im; mi = -re; ur = -im; ui = re; end
    endcase
    lr.push_front(mr); li.push_front(mi); hr.push_front(ur); hi.push_front(ui);
    in_valid = 1; in_data.re = 16'(re); in_data.im = 16'(im);
    @(negedge clk); in_valid = 0;
    checks++;
    if (out_valid != (n % 2 == 1)) begin failures++; $display("out_valid wrong at %0d", n); end
    if (n % 2 == 1) begin
      int a = 0, b = 0, c = 0, d = 0;
      for (int t = 0; t < 7; t++) begin
        if (t < lr.size()) begin
          a += tap[t] * lr[t]; b += tap[t] * li[t]; c += tap[t] * hr[t]; d += tap[t] * hi[t];
        end
      end
      checks++;
      if (lo_data.re != 16'(fl32(a)) || lo_data.im != 16'(fl32(b)) ||
          hi_data.re != 16'(fl32(c)) || hi_data.im != 16'(fl32(d))) begin
        failures++; $display("mismatch at %0d", n);
      end
    end
    n++;
  endtask

  initial begin
    tap[0] = -1; tap[1] = 0; tap[2] = 9; tap[3] = 16; tap[4] = 9; tap[5] = 0; tap[6] = -1;
    n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      push($signed($urandom_range(0, 40000)) - 20000, $signed($urandom_range(0, 40000)) - 20000);
      if ($urandom_range(0, 2) == 0) @(negedge clk);
    end
    // tone at -fs/4: x[n] = A*(-j)^n  -> lower output constant A, upper small
    for (int i = 0; i < 40; i++) begin
      int ph;
      ph = n % 4;
      push(ph == 0 ? 10000 : ph == 2 ? -10000 : 0, ph == 1 ? -10000 : ph == 3 ? 10000 : 0);
      if (i > 10 && n % 2 == 0) begin
        checks++;
        if (lo_data.re < 9900 || hi_data.re > 200 || hi_data.re < -200) begin
          failures++; $display("-fs/4 tone: lo %0d hi %0d", lo_data.re, hi_data.re);
        end
      end
    end
    // tone at +fs/4: x[n] = A*j^n -> upper output constant A
    for (int i = 0; i < 40; i++) begin
      int ph;
      ph = n % 4;
      push(ph == 0 ? 10000 : ph == 2 ? -10000 : 0, ph == 1 ? 10000 : ph == 3 ? -10000 : 0);
      if (i > 10 && n % 2 == 0) begin
        checks++;
        if (hi_data.re < 9900 || lo_data.re > 200 || lo_data.re < -200) begin
          failures++; $display("+fs/4 tone: lo %0d hi %0d", lo_data.re, hi_data.re);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
