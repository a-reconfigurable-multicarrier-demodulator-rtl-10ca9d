// input_demux: front end of the reconfigurable transmultiplexer. It routes the
// quadrature-sampled FDMA stream to one of the three channelizing modules:
// case 1 goes to module 2, case 3 to module 3, and case 2 to module 1, which
// splits the band in halves for modules 2 and 3. The routing follows the
// document; the one-cycle registered outputs are this design's choice.
// Interface: one complex sample per cycle when in_valid is high; each output
// port carries the sample one cycle later with its own valid.
module input_demux
  import mcd_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  mcd_case_e mode,
  input  logic      in_valid,
  input  cplx_t     in_data,
  output logic      m1_valid,
  output cplx_t     m1_data,
  output logic      m2_valid,
  output cplx_t     m2_data,
  output logic      m3_valid,
  output cplx_t     m3_data
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1_valid <= 1'b0;
      m2_valid <= 1'b0;
      m3_valid <= 1'b0;
      m1_data  <= '0;
      m2_data  <= '0;
      m3_data  <= '0;
    end else begin
      m1_valid <= in_valid && (mode == CASE2);
      m2_valid <= in_valid && (mode == CASE1);
      m3_valid <= in_valid && (mode == CASE3);
      if (in_valid && mode == CASE2) m1_data <= in_data;
      if (in_valid && mode == CASE1) m2_data <= in_data;
      if (in_valid && mode == CASE3) m3_data <= in_data;
    end
  end
endmodule
