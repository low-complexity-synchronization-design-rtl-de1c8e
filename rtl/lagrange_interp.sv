// lagrange_interp: cubic Lagrange interpolator in Farrow form for sampling
// clock offset compensation.
//
// The four most recent input samples x(-1), x(0), x(1), x(2) (oldest
// first) define a cubic through t = -1, 0, 1, 2; the output is its value
// at t = mu, with mu supplied by the interpolator controller and normally
// in [-0.5, 0.5). In Farrow form the cubic's coefficients are fixed
// filters of the window (computed here times six to stay in integers)
//   6c3 = -x(-1) + 3x(0) - 3x(1) + x(2)
//   6c2 = 3x(-1) - 6x(0) + 3x(1)
//   6c1 = -2x(-1) - 3x(0) + 6x(1) - x(2)
//   6c0 = 6x(0)
// and y = ((c3*mu + c2)*mu + c1)*mu + c0 (Horner). The final division by
// six is a multiplication by round(2^16/6). The document specifies a
// four-sample cubic Lagrange interpolator; the Farrow arrangement, the
// pipelining and word lengths are this design's choices.
//
// Interface: in_valid shifts in_data into the window; calc with mu
// requests an output from the current window. out_valid/out_data follow
// calc by 2 cycles. Real and imaginary parts are interpolated alike.
module lagrange_interp
  import dvbt_pkg::*;
#(
  parameter int MUW = 12   // mu width, 2^(MUW-1) = one sample
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  cplx_t                 in_data,
  input  logic                  calc,
  input  logic signed [MUW-1:0] mu,
  output logic                  out_valid,
  output cplx_t                 out_data
);
  localparam int CW = SW + 4;          // width of the 6*c coefficients
  localparam int F  = MUW - 1;         // fractional bits of mu

  cplx_t win [4];                      // win[0] = x(2) newest .. win[3] = x(-1)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) win[i] <= '0;
    end else if (in_valid) begin
      win[0] <= in_data;
      for (int i = 1; i < 4; i++) win[i] <= win[i-1];
    end
  end

  // stage 1: Farrow coefficients for both rails
  logic signed [CW-1:0] c3 [2], c2 [2], c1 [2], c0 [2];
  logic signed [MUW-1:0] mu1;
  logic                  v1, v2;
  logic signed [SW-1:0]  ys [2];       // interpolated, saturated rails

  function automatic logic signed [SW-1:0] rail(cplx_t c, int r);
    return r == 0 ? c.re : c.im;
  endfunction

  for (genvar r = 0; r < 2; r++) begin : g_rail
    logic signed [CW-1:0] xm1, x0, x1, x2;
    assign xm1 = CW'(rail(win[3], r));
    assign x0  = CW'(rail(win[2], r));
    assign x1  = CW'(rail(win[1], r));
    assign x2  = CW'(rail(win[0], r));

    always_ff @(posedge clk) begin
      if (calc) begin
        c3[r] <= -xm1 + 3 * x0 - 3 * x1 + x2;
        c2[r] <= 3 * xm1 - 6 * x0 + 3 * x1;
        c1[r] <= -2 * xm1 - 3 * x0 + 6 * x1 - x2;
        c0[r] <= 6 * x0;
      end
    end

    // stage 2: Horner evaluation and division by six
    logic signed [CW+MUW+1:0] h3, h2, h1;
    logic signed [CW+18:0]    y6;
    logic signed [31:0]       yr;
    assign h3 = ((CW+MUW+2)'(c3[r]) * (CW+MUW+2)'(mu1)) >>> F;
    assign h2 = ((h3 + (CW+MUW+2)'(c2[r])) * (CW+MUW+2)'(mu1)) >>> F;
    assign h1 = ((h2 + (CW+MUW+2)'(c1[r])) * (CW+MUW+2)'(mu1)) >>> F;
    assign y6 = (CW+19)'(h1 + (CW+MUW+2)'(c0[r])) * (CW+19)'(10923);
    assign yr = 32'((y6 + (CW+19)'(1 <<< 15)) >>> 16);
    assign ys[r] = sat_sw(yr);
  end

  always_ff @(posedge clk) if (v1) out_data <= '{re: ys[0], im: ys[1]};

  always_ff @(posedge clk) if (calc) mu1 <= mu;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
    end else begin
      v1 <= calc;
      v2 <= v1;
    end
  end
  assign out_valid = v2;

endmodule
