// tb_input_demux: drives random samples in all three cases and checks that
// each appears, one cycle later, on exactly the port its case selects.
module tb_input_demux;
  import mcd_pkg::*;
  logic clk = 0, rst_n = 1, in_valid = 0;
  mcd_case_e mode = CASE1;
  cplx_t in_data = '0, m1_data, m2_data, m3_data;
  logic m1_valid, m2_valid, m3_valid;
  int checks = 0, failures = 0;

  input_demux dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic v;
    cplx_t d;
    mcd_case_e md;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      v = 1'($urandom_range(0, 1));
      md = mcd_case_e'($urandom_range(0, 2));
      d = cplx_t'($urandom);
      in_valid = v; mode = md; in_data = d;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (m1_valid != (v && md == CASE2) || m2_valid != (v && md == CASE1) ||
          m3_valid != (v && md == CASE3)) begin
        failures++; $display("valid routing wrong for case %0d", md);
      end
      if (v) begin
        checks++;
        if ((md == CASE2 && m1_data != d) || (md == CASE1 && m2_data != d) ||
            (md == CASE3 && m3_data != d)) begin
          failures++; $display("data wrong for case %0d", md);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
