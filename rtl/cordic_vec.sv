// cordic_vec: pipelined CORDIC in vectoring mode, used by the carrier
// recovery to find the angle of a complex accumulator. The vector is first
// folded into the right half plane (adding pi to the angle), then ITER
// micro-rotations drive y to zero while the angle register sums
// +-atan(2**-i). The angle is in units of 2*pi/2**16 (a full turn wraps).
// One input per cycle; the result appears ITER+1 cycles later with the tag
// that came with it.
module cordic_vec #(
  parameter int XW   = 24,
  parameter int ITER = 14,
  parameter int TAGW = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [XW-1:0] in_x,
  input  logic signed [XW-1:0] in_y,
  input  logic [TAGW-1:0]      in_tag,
  output logic                 out_valid,
  output logic [15:0]          out_angle,
  output logic [TAGW-1:0]      out_tag
);
  localparam int IW = XW + 2;
  logic signed [IW-1:0] x [ITER+1];
  logic signed [IW-1:0] y [ITER+1];
  logic [15:0]          z [ITER+1];
  logic [TAGW-1:0]      t [ITER+1];
  logic                 v [ITER+1];
  logic [15:0]          atan_tab [ITER];

  initial begin
    for (int i = 0; i < ITER; i++)
      atan_tab[i] = 16'($rtoi($atan(1.0 / (2.0 ** i)) / 6.283185307179586 * 65536.0 + 0.5));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= ITER; i++) begin
        x[i] <= '0; y[i] <= '0; z[i] <= '0; t[i] <= '0; v[i] <= 1'b0;
      end
    end else begin
      // fold into the right half plane
      v[0] <= in_valid;
      t[0] <= in_tag;
      if (in_x < 0) begin
        x[0] <= -IW'(in_x); y[0] <= -IW'(in_y); z[0] <= 16'h8000;
      end else begin
        x[0] <= IW'(in_x);  y[0] <= IW'(in_y);  z[0] <= 16'h0000;
      end
      for (int i = 0; i < ITER; i++) begin
        v[i+1] <= v[i];
        t[i+1] <= t[i];
        if (y[i] >= 0) begin
          x[i+1] <= x[i] + (y[i] >>> i);
          y[i+1] <= y[i] - (x[i] >>> i);
          z[i+1] <= z[i] + atan_tab[i];
        end else begin
          x[i+1] <= x[i] - (y[i] >>> i);
          y[i+1] <= y[i] + (x[i] >>> i);
          z[i+1] <= z[i] - atan_tab[i];
        end
      end
    end
  end

  assign out_valid = v[ITER];
  assign out_angle = z[ITER];
  assign out_tag   = t[ITER];
endmodule
