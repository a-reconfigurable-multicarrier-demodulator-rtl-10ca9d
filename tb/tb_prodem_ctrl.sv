// tb_prodem_ctrl: frames of 5 channels (LOG_NCH = 3), 4 samples per
// interval (LOG_LS = 2), DRAIN = 3. Checks: the sample index and bank
// follow the frames; the learned channel count; each completed interval is
// replayed from its own bank as sample index 0..3 x channel 0..4 in order,
// starting DRAIN+2 cycles after its last sample; rp_done pulses once per
// replay; overrun stays low at a slow input rate and is set when intervals
// arrive back to back faster than they can be replayed.
module tb_prodem_ctrl;
  localparam int LOG_NCH = 3, LOG_LS = 2, DRAIN = 3, NCH = 5;
  logic clk = 0, rst_n = 1, in_valid = 0, in_last = 0;
  logic [LOG_LS-1:0] cur_sidx, rp_sidx;
  logic cur_bank, rp_valid, rp_bank, rp_done, overrun;
  logic [LOG_NCH-1:0] rp_ch;
  logic [LOG_NCH:0] nch;
  int checks = 0, failures = 0;
  int msidx = 0, mbank = 0, cyc = 0, end_cyc = -1, exp_bank = 0, rp_n = 0, ndone = 0, nrp = 0;

  prodem_ctrl #(.LOG_NCH(LOG_NCH), .LOG_LS(LOG_LS), .DRAIN(DRAIN)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // replay monitor
  always @(posedge clk) begin
    cyc++;
    if (rp_done) ndone++;
    if (rp_valid && !overrun) begin
      if (rp_n == 0) begin
        checks++;
        if (cyc - end_cyc != DRAIN + 3) begin failures++; $display("replay started after %0d", cyc - end_cyc); end
      end
      checks++;
      if (rp_sidx != LOG_LS'(rp_n / NCH) || rp_ch != LOG_NCH'(rp_n % NCH) || rp_bank != 1'(exp_bank)) begin
        failures++; $display("replay order wrong at %0d: sidx %0d ch %0d bank %0d", rp_n, rp_sidx, rp_ch, rp_bank);
      end
      rp_n++;
      if (rp_n == 4 * NCH) begin rp_n = 0; nrp++; exp_bank ^= 1; end
    end
  end

  task automatic frame(input int gap);
    for (int c = 0; c < NCH; c++) begin
      in_valid = 1; in_last = (c == NCH - 1);
      #1;
      checks++;
      if (cur_sidx != LOG_LS'(msidx) || cur_bank != 1'(mbank)) begin
        failures++; $display("write side at sidx %0d bank %0d", cur_sidx, cur_bank);
      end
      @(negedge clk);
      if (c == NCH - 1 && msidx == 3) end_cyc = cyc;
      in_valid = 0;
      repeat (gap) @(negedge clk);
    end
    if (msidx == 3) begin msidx = 0; mbank ^= 1; end else msidx++;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 12; f++) frame(2);
    repeat (40) @(negedge clk);
    checks++;
    if (nch != 5) begin failures++; $display("nch %0d", nch); end
    checks++;
    if (overrun || nrp != 3 || ndone != 3) begin failures++; $display("overrun %0d replays %0d done %0d", overrun, nrp, ndone); end
    for (int f = 0; f < 12; f++) frame(0);
    checks++;
    if (!overrun) begin failures++; $display("overrun not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
