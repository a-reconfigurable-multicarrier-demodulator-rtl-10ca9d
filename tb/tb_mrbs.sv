// tb_mrbs: fills both banks of a small sample buffer (8 channels, 4 samples
// per interval) with random data at random addresses, keeping a model, then
// reads every location and checks the latched read data one cycle later.
module tb_mrbs;
  import mcd_pkg::*;
  localparam int LOG_NCH = 3, LOG_LS = 2;
  logic clk = 0, wr_en = 0, wr_bank = 0, rd_en = 0, rd_bank = 0;
  logic [LOG_LS-1:0] wr_sidx = '0, rd_sidx = '0;
  logic [LOG_NCH-1:0] wr_ch = '0, rd_ch = '0;
  cplx_t wr_data = '0, rd_data;
  cplx_t model [64];
  int checks = 0, failures = 0;

  mrbs #(.LOG_NCH(LOG_NCH), .LOG_LS(LOG_LS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      wr_en = 1; {wr_bank, wr_sidx, wr_ch} = 6'(a); wr_data = cplx_t'($urandom); model[a] = wr_data;
    end
    for (int i = 0; i < 200; i++) begin
      int a;
      @(negedge clk);
      a = $urandom_range(0, 63);
      wr_en = 1; {wr_bank, wr_sidx, wr_ch} = 6'(a); wr_data = cplx_t'($urandom); model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int a = 0; a < 64; a++) begin
      rd_en = 1; {rd_bank, rd_sidx, rd_ch} = 6'(a);
      @(negedge clk);
      checks++;
      if (rd_data != model[a]) begin failures++; $display("addr %0d wrong", a); end
      rd_en = 0; {rd_bank, rd_sidx, rd_ch} = 6'(a + 1);
      @(negedge clk);
      checks++;
      if (rd_data != model[a]) begin failures++; $display("latch lost data at %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
