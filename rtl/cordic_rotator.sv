// cordic_rotator: CORDIC-based derotator for carrier frequency offset
// compensation.
//
// Each valid input sample is rotated by minus the phase supplied with it,
// y = x * exp(-j*2*pi*phase/2^PW). A CORDIC in rotation mode does the job of
// both the sine/cosine generator and the complex multiplier of a
// conventional derotator, which is the reason the document gives for using
// it. The angle is first folded into [-1/4, 1/4) turn by an exact 90-degree
// pre-rotation, then ITER micro-rotations by +-atan(2^-i) drive the residual
// angle to zero. The CORDIC gain (about 1.647) is removed by one constant
// multiplication at the output so that the derotator has unity gain; the
// output is saturated to SW bits.
//
// Interface: in_valid/in_data/in_phase, out_valid/out_data. Fully
// pipelined, one sample per cycle, latency ITER+2 cycles. The stage count,
// phase width and gain correction are this design's choices; the document
// only says that the derotator is CORDIC based.
module cordic_rotator
  import dvbt_pkg::*;
#(
  parameter int PW   = 16,   // phase width, 2^PW = one turn
  parameter int ITER = 14    // micro-rotation stages
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  cplx_t         in_data,
  input  logic [PW-1:0] in_phase,
  output logic          out_valid,
  output cplx_t         out_data
);
  localparam int GB = 4;           // fractional guard bits
  localparam int IW = SW + 3 + GB; // internal width: gain 1.65 and sqrt(2) growth

  logic signed [IW-1:0] xs [ITER+1];
  logic signed [IW-1:0] ys [ITER+1];
  logic signed [31:0]   zs [ITER+1];
  logic [ITER+1:0]      vld;

  // Stage 0: the rotation angle is -phase (32-bit turn fraction); fold it
  // into [-1/4, 1/4) turn with an exact multiple of 90 degrees.
  logic signed [31:0] z0;
  assign z0 = -$signed({in_phase, {(32-PW){1'b0}}});

  always_ff @(posedge clk) begin
    unique case (z0[31:30])
      2'b01: begin  // [1/4, 1/2): rotate by +90 degrees first
        xs[0] <= -(IW'(in_data.im) <<< GB);
        ys[0] <=  (IW'(in_data.re) <<< GB);
        zs[0] <= z0 - 32'sh4000_0000;
      end
      2'b10: begin  // [-1/2, -1/4): rotate by -90 degrees first
        xs[0] <=  (IW'(in_data.im) <<< GB);
        ys[0] <= -(IW'(in_data.re) <<< GB);
        zs[0] <= z0 + 32'sh4000_0000;
      end
      default: begin
        xs[0] <= (IW'(in_data.re) <<< GB);
        ys[0] <= (IW'(in_data.im) <<< GB);
        zs[0] <= z0;
      end
    endcase
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    always_ff @(posedge clk) begin
      if (!zs[i][31]) begin
        xs[i+1] <= xs[i] - (ys[i] >>> i);
        ys[i+1] <= ys[i] + (xs[i] >>> i);
        zs[i+1] <= zs[i] - $signed(cordic_atan(i));
      end else begin
        xs[i+1] <= xs[i] + (ys[i] >>> i);
        ys[i+1] <= ys[i] - (xs[i] >>> i);
        zs[i+1] <= zs[i] + $signed(cordic_atan(i));
      end
    end
  end

  // Gain correction and saturation
  localparam int SH = 16 + GB;
  logic signed [IW+17:0] xk, yk, xr, yr;
  assign xk = xs[ITER] * $signed(18'(CORDIC_INV_GAIN_Q16));
  assign yk = ys[ITER] * $signed(18'(CORDIC_INV_GAIN_Q16));
  assign xr = (xk + (IW+18)'(1 <<< (SH - 1))) >>> SH;
  assign yr = (yk + (IW+18)'(1 <<< (SH - 1))) >>> SH;

  always_ff @(posedge clk) begin
    out_data.re <= sat_sw(32'(xr));
    out_data.im <= sat_sw(32'(yr));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[ITER:0], in_valid};
  end
  assign out_valid = vld[ITER+1];

endmodule
