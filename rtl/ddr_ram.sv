// ddr_ram: digital data RAM. Holds the two recovered bits of every symbol of
// every channel for one estimation interval, at the unique address
// {bank, channel, symbol}. Two banks let the data of one interval be read
// out (towards the baseband switch) while the next one is written.
// A data RAM with a unique location per result is the document's; the
// banking and the layout are this design's.
// Timing: write in the cycle of wr_en; combinational read.
module ddr_ram #(
  parameter int LOG_NCH  = 10,
  parameter int LOG_LSYM = 4
) (
  input  logic                clk,
  input  logic                wr_en,
  input  logic                wr_bank,
  input  logic [LOG_NCH-1:0]  wr_ch,
  input  logic [LOG_LSYM-1:0] wr_sym,
  input  logic [1:0]          wr_bits,
  input  logic                rd_bank,
  input  logic [LOG_NCH-1:0]  rd_ch,
  input  logic [LOG_LSYM-1:0] rd_sym,
  output logic [1:0]          rd_bits
);
  logic [1:0] mem [2 << (LOG_NCH + LOG_LSYM)];

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_bank, wr_ch, wr_sym}] <= wr_bits;
  end
  assign rd_bits = mem[{rd_bank, rd_ch, rd_sym}];
endmodule
