// tb_ddr_ram: writes random bit pairs to every address of a small data RAM
// (4 channels, 4 symbols, two banks) and reads them all back.
module tb_ddr_ram;
  localparam int LOG_NCH = 2, LOG_LSYM = 2;
  logic clk = 0, wr_en = 0, wr_bank = 0, rd_bank = 0;
  logic [LOG_NCH-1:0] wr_ch = '0, rd_ch = '0;
  logic [LOG_LSYM-1:0] wr_sym = '0, rd_sym = '0;
  logic [1:0] wr_bits = '0, rd_bits;
  logic [1:0] model [32];
  int checks = 0, failures = 0;

  ddr_ram #(.LOG_NCH(LOG_NCH), .LOG_LSYM(LOG_LSYM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3; r++)
      for (int a = 0; a < 32; a++) begin
        @(negedge clk);
        wr_en = 1; {wr_bank, wr_ch, wr_sym} = 5'(a); wr_bits = 2'($urandom); model[a] = wr_bits;
      end
    @(negedge clk); wr_en = 0;
    for (int a = 0; a < 32; a++) begin
      {rd_bank, rd_ch, rd_sym} = 5'(a); #1;
      checks++;
      if (rd_bits != model[a]) begin failures++; $display("addr %0d wrong", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
