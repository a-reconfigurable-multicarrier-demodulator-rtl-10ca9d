// prodem_ctrl: addressing and control of the programmable demodulator.
// Write side: it follows the incoming channel stream (one frame = one sample
// of every channel, the last one flagged) and keeps the sample index within
// the estimation interval and the bank (interval parity) that the
// interpolator, carrier recovery and sample buffer use. The number of
// channels is learned from the frame length, so it may be anything up to
// 2**LOG_NCH. Read side: DRAIN cycles after an interval is complete (time
// for the carrier recovery to finish its phases), it replays that interval
// from the sample buffer, sample index by sample index and channel by
// channel, for the data and timing recovery. overrun is a sticky flag set
// when an interval completes while the previous replay is still running
// (the input rate was too high); the new replay then waits its turn.
// That addressing and control must be shared by the four modules is the
// document's; this particular sequencing is this design's.
// Timing: cur_sidx/cur_bank describe the sample presented in this cycle;
// rp_* issue one read per cycle; rp_done pulses in the cycle after the
// last read.
module prodem_ctrl #(
  parameter int LOG_NCH = 10,
  parameter int LOG_LS  = 5,
  parameter int DRAIN   = 18
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               in_last,
  output logic [LOG_LS-1:0]  cur_sidx,
  output logic               cur_bank,
  output logic               rp_valid,
  output logic [LOG_NCH-1:0] rp_ch,
  output logic [LOG_LS-1:0]  rp_sidx,
  output logic               rp_bank,
  output logic               rp_done,
  output logic [LOG_NCH:0]   nch,
  output logic               overrun
);
  localparam int DW = $clog2(DRAIN + 1);
  logic [LOG_NCH:0] cnt;
  logic [DW-1:0]    drain;
  logic             draining, req, req_bank, busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_sidx <= '0; cur_bank <= 1'b0; cnt <= '0; nch <= '0;
      drain <= '0; draining <= 1'b0; req <= 1'b0; req_bank <= 1'b0;
      busy <= 1'b0; rp_ch <= '0; rp_sidx <= '0; rp_bank <= 1'b0;
      rp_done <= 1'b0; overrun <= 1'b0;
    end else begin
      rp_done <= 1'b0;
      // ---- write side
      if (in_valid) begin
        if (in_last) begin
          cnt <= '0;
          nch <= cnt + 1'b1;
          if (cur_sidx == '1) begin
            cur_sidx <= '0;
            cur_bank <= ~cur_bank;
            draining <= 1'b1;
            drain    <= DW'(DRAIN);
            req_bank <= cur_bank;
            if (busy || req || draining) overrun <= 1'b1;
          end else begin
            cur_sidx <= cur_sidx + 1'b1;
          end
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
      // ---- wait for the carrier recovery to finish the interval
      if (draining && !(in_valid && in_last && cur_sidx == '1)) begin
        if (drain == '0) begin
          draining <= 1'b0;
          req      <= 1'b1;
        end else begin
          drain <= drain - 1'b1;
        end
      end
      // ---- replay
      if (!busy && req) begin
        busy    <= 1'b1;
        req     <= 1'b0;
        rp_bank <= req_bank;
        rp_ch   <= '0;
        rp_sidx <= '0;
      end else if (busy) begin
        if ({1'b0, rp_ch} == nch - 1'b1) begin
          rp_ch <= '0;
          if (rp_sidx == '1) begin
            busy    <= 1'b0;
            rp_done <= 1'b1;
          end else begin
            rp_sidx <= rp_sidx + 1'b1;
          end
        end else begin
          rp_ch <= rp_ch + 1'b1;
        end
      end
    end
  end

  assign rp_valid = busy;
endmodule
