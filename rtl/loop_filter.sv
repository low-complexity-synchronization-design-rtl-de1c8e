// loop_filter: proportional-integral loop filter of the RCFO and SCO
// tracking loops.
//
// For every valid error sample x the filter produces
//   y[n] = C1*x[n] + I[n-1],    I[n] = I[n-1] + C2*x[n],
// i.e. a proportional branch with gain C1 and an integrator with gain C2
// whose register output is added to the proportional branch, as drawn in
// the document's loop filter. Both coefficients are powers of two, so the
// two multipliers are arithmetic shifts: C1 = 2^-C1SH, C2 = 2^-C2SH.
// The values of C1SH and C2SH are not given in the document and are
// parameters here.
//
// Fixed point: the input is a signed IW-bit integer; internally and at the
// output the value carries FB = C2SH extra fractional bits, so y is x's
// unit times 2^-FB and no bit of C2*x is lost. The integrator saturates.
//
// Interface: clr empties the integrator; in_valid/in_err in,
// out_valid/out_ctrl one cycle later. One sample per cycle at most.
module loop_filter #(
  parameter int IW   = 16,  // error input width
  parameter int OW   = 28,  // output width (FB fractional bits)
  parameter int C1SH = 1,   // C1 = 2^-C1SH
  parameter int C2SH = 4    // C2 = 2^-C2SH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_err,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_ctrl
);
  localparam int FB = C2SH;
  localparam logic signed [OW-1:0] MAXV = {1'b0, {(OW-1){1'b1}}};
  localparam logic signed [OW-1:0] MINV = {1'b1, {(OW-1){1'b0}}};

  logic signed [OW-1:0] integ;
  logic signed [OW-1:0] xf, p_term, i_term;
  logic signed [OW:0]   i_next, y_next;

  assign xf     = OW'(in_err) <<< FB;     // x with FB fractional bits
  assign p_term = xf >>> C1SH;
  assign i_term = xf >>> C2SH;
  assign i_next = (OW+1)'(integ) + (OW+1)'(i_term);
  assign y_next = (OW+1)'(integ) + (OW+1)'(p_term);

  function automatic logic signed [OW-1:0] sat(logic signed [OW:0] v);
    if (v > (OW+1)'(MAXV)) return MAXV;
    if (v < (OW+1)'(MINV)) return MINV;
    return v[OW-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ     <= '0;
      out_ctrl  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid & ~clr;
      if (clr) begin
        integ    <= '0;
        out_ctrl <= '0;
      end else if (in_valid) begin
        integ    <= sat(i_next);
        out_ctrl <= sat(y_next);
      end
    end
  end

endmodule
