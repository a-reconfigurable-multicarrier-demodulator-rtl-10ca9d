// mrbs: multiplexed RAM buffer for samples. While the carrier recovery works
// through an estimation interval, the same interpolated samples of every
// channel are written here, so that the data recovery can derotate them
// once the phase of the interval is known. The memory has two banks of
// LS x 2**LOG_NCH complex samples: the interval being received fills one
// bank while the previous interval is read from the other. Addresses are
// {bank, sample index, channel}. The read data is held in an output latch
// (a registered read), the RAM-latch pair of the document.
// Storing the samples of one estimation interval for all channels is the
// document's; the two banks and the address layout are this design's.
// Timing: write in the cycle of wr_en; read data valid one cycle after rd_en.
module mrbs
  import mcd_pkg::*;
#(
  parameter int LOG_NCH = 10,
  parameter int LOG_LS  = 5          // log2 of samples per channel and interval
) (
  input  logic               clk,
  input  logic               wr_en,
  input  logic               wr_bank,
  input  logic [LOG_LS-1:0]  wr_sidx,
  input  logic [LOG_NCH-1:0] wr_ch,
  input  cplx_t              wr_data,
  input  logic               rd_en,
  input  logic               rd_bank,
  input  logic [LOG_LS-1:0]  rd_sidx,
  input  logic [LOG_NCH-1:0] rd_ch,
  output cplx_t              rd_data
);
  localparam int DEPTH = 2 << (LOG_LS + LOG_NCH);
  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_bank, wr_sidx, wr_ch}] <= wr_data;
    if (rd_en) rd_data <= mem[{rd_bank, rd_sidx, rd_ch}];
  end
endmodule
