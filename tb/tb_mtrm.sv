// tb_mtrm: two interleaved channels deliver random samples, alternately
// symbol (even index) and midway (odd index). A model keeps, per channel,
// the previous symbol, the midway sample and the 16-bit timing register
// and forms the Gardner error m_I*(p_I-c_I) + m_Q*(p_Q-c_Q). After every
// symbol the error output and the mu read back for that channel must match.
// A final part feeds a steady "late" pattern and checks that mu decreases.
module tb_mtrm;
  import mcd_pkg::*;
  localparam int LOG_NCH = 1, LOG_LS = 3, MUW = 8, GSH = 20;
  logic clk = 0, rst_n = 1, in_valid = 0, ted_valid;
  logic [LOG_NCH-1:0] in_ch = '0, mu_ch = '0;
  logic [LOG_LS-1:0] in_sidx = '0;
  cplx_t in_data = '0;
  logic [MUW-1:0] mu;
  logic signed [33:0] ted_err;
  int checks = 0, failures = 0;
  int p_r [2], p_i [2], m_r [2], m_i [2], tau [2], sidx [2];
  bit have [2];

  mtrm #(.LOG_NCH(LOG_NCH), .LOG_LS(LOG_LS), .MUW(MUW), .GSH(GSH)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(input int c, input int xr, input int xi);
    longint e;
    in_ch = 1'(c); in_sidx = 3'(sidx[c]); in_data.re = 16'(xr); in_data.im = 16'(xi); in_valid = 1;
    @(negedge clk); in_valid = 0;
    if (sidx[c] % 2 == 1) begin
      m_r[c] = xr; m_i[c] = xi;
    end else begin
      if (have[c]) begin
        e = longint'(m_r[c]) * (p_r[c] - xr) + longint'(m_i[c]) * (p_i[c] - xi);
        tau[c] = tau[c] + int'(e >>> GSH);
        if (tau[c] < 0) tau[c] = 0;
        if (tau[c] > 65535) tau[c] = 65535;
        checks++;
        if (!ted_valid || ted_err != 34'(e)) begin failures++; $display("error term wrong ch %0d", c); end
      end else begin
        checks++;
        if (ted_valid) begin failures++; $display("error without previous symbol"); end
      end
      have[c] = 1; p_r[c] = xr; p_i[c] = xi;
      mu_ch = 1'(c); #1;
      checks++;
      if (mu != 8'(tau[c] >> 8)) begin failures++; $display("mu %0d expected %0d", mu, tau[c] >> 8); end
    end
    sidx[c] = (sidx[c] + 1) % 8;
  endtask

  initial begin
    int m0;
    tau[0] = 32768; tau[1] = 32768;
    repeat (2) @(negedge clk); rst_n = 1; repeat (8) @(negedge clk);
    for (int i = 0; i < 600; i++) begin
      int c;
      c = $urandom_range(0, 1);
      feed(c, $signed($urandom_range(0, 60000)) - 30000, $signed($urandom_range(0, 60000)) - 30000);
    end
    // late sampling of an alternating +-A pattern: midway sample has the
    // sign of the current symbol, error negative, mu must fall
    mu_ch = 0; #1; m0 = mu;
    for (int s = 0; s < 40; s++) begin
      int a;
      a = (s % 2) ? 20000 : -20000;
      if (sidx[0] % 2 == 0) feed(0, 20000, 0);  // align so the next sample is a midway one
      feed(0, -a / 4, 0);    // midway, already past the zero crossing
      feed(0, -a, 0);        // symbol
    end
    mu_ch = 0; #1;
    checks++;
    if (!(mu < m0)) begin failures++; $display("mu did not fall: %0d -> %0d", m0, mu); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
