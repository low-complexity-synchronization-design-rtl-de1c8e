// cordic_vectoring: the tan^-1 unit of the joint RCFO/SCO estimator.
//
// Computes the angle of a complex number with a CORDIC in vectoring mode,
// as the document specifies. Inputs in the left half plane are first
// rotated by 180 degrees (exactly, by negation); ITER micro-rotations then
// drive the imaginary part to zero while summing the rotation angles. The
// angle is returned as a PW-bit two's-complement fraction of one turn
// (-2^(PW-1) is -pi). The magnitude, scaled by the CORDIC gain of about
// 1.647, is returned as well.
//
// Interface: in_valid/in_re/in_im, out_valid/out_angle/out_mag. Fully
// pipelined, latency ITER+1 cycles. Input width, angle width and stage
// count are this design's choices.
module cordic_vectoring
  import dvbt_pkg::*;
#(
  parameter int DW   = 24,   // input width
  parameter int PW   = 16,   // output angle width, 2^PW = one turn
  parameter int ITER = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic signed [PW-1:0] out_angle,
  output logic        [DW:0]   out_mag
);
  localparam int GB = 6;        // fractional guard bits
  localparam int IW = DW + 2 + GB;

  logic signed [IW-1:0] xs [ITER+1];
  logic signed [IW-1:0] ys [ITER+1];
  logic signed [31:0]   zs [ITER+1];
  logic [ITER:0]        vld;

  always_ff @(posedge clk) begin
    if (in_re < 0) begin
      xs[0] <= -(IW'(in_re) <<< GB);
      ys[0] <= -(IW'(in_im) <<< GB);
      zs[0] <= 32'sh8000_0000;  // 1/2 turn
    end else begin
      xs[0] <= (IW'(in_re) <<< GB);
      ys[0] <= (IW'(in_im) <<< GB);
      zs[0] <= '0;
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    always_ff @(posedge clk) begin
      if (ys[i] >= 0) begin
        xs[i+1] <= xs[i] + (ys[i] >>> i);
        ys[i+1] <= ys[i] - (xs[i] >>> i);
        zs[i+1] <= zs[i] + $signed(cordic_atan(i));
      end else begin
        xs[i+1] <= xs[i] - (ys[i] >>> i);
        ys[i+1] <= ys[i] + (xs[i] >>> i);
        zs[i+1] <= zs[i] - $signed(cordic_atan(i));
      end
    end
  end

  // round the 32-bit turn fraction to PW bits
  logic signed [31:0] zr;
  assign zr = zs[ITER] + 32'(1 <<< (31 - PW));
  assign out_angle = zr[31 -: PW];
  assign out_mag   = xs[ITER][DW+GB:GB];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[ITER-1:0], in_valid};
  end
  assign out_valid = vld[ITER];

endmodule
