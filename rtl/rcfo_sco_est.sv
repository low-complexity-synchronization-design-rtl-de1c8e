// rcfo_sco_est: joint residual-CFO and sampling-clock-offset estimator.
//
// For every continual pilot of the current symbol the estimator forms
// Y_l(k) * conj(Y_{l-1}(k)) with the same pilot of the previous symbol
// (one complex multiplier) and accumulates the products (complex adder and
// register), separately for the pilots in the lower and in the upper half
// of the band. A residual CFO rotates all pilots by the same phase from
// one symbol to the next; a sampling clock offset adds a phase that grows
// linearly with the carrier index. At the end of the symbol one CORDIC
// tan^-1 unit takes the angle of the lower-half sum and then of the
// upper-half sum; their sum measures the RCFO and their difference the
// SCO. These are the document's structure (complex multiplier, complex
// adder with register, tan^-1, sum and difference feeding the two loop
// filters); splitting the pilots into two half-band sums is this design's
// reading of how one tan^-1 output feeds both the sum and the difference.
//
// The previous symbol's pilots are held in a NCP-word memory indexed by
// the pilot's ordinal; it is read and overwritten as each pilot arrives.
// After start (or the first symbol) no estimate is produced, since there
// is no previous symbol yet.
//
// Interface: sym_start clears the sums; cp_valid/cp_data/cp_upper deliver
// the continual pilots of a symbol in carrier order; sym_end (after the
// last pilot) starts the angle computation. est_valid pulses with
// rcfo_err = phi_up + phi_low and sco_err = phi_up - phi_low, angles in
// units of 2^-PW turn, about 2*ITER+4 cycles after sym_end.
module rcfo_sco_est
  import dvbt_pkg::*;
#(
  parameter int NCP  = 177,  // continual pilots per symbol (8K mode)
  parameter int PW   = 16,   // angle width
  parameter int AW   = 34    // accumulator width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,     // forget the previous symbol
  input  logic                 sym_start,
  input  logic                 cp_valid,
  input  cplx_t                cp_data,
  input  logic                 cp_upper,
  input  logic                 sym_end,
  output logic                 est_valid,
  output logic signed [PW:0]   rcfo_err,
  output logic signed [PW:0]   sco_err
);
  localparam int ITER = 16;
  localparam int NW = $clog2(NCP);

  cplx_t prev_mem [NCP];
  logic [NW-1:0] cnt;
  logic          have_prev;
  logic signed [AW-1:0] acc_re [2], acc_im [2];

  // complex multiplier: cur * conj(prev)
  cplx_t prev;
  logic signed [2*SW:0] p_re, p_im;
  assign prev = prev_mem[cnt];
  assign p_re = (2*SW+1)'(cp_data.re * prev.re) + (2*SW+1)'(cp_data.im * prev.im);
  assign p_im = (2*SW+1)'(cp_data.im * prev.re) - (2*SW+1)'(cp_data.re * prev.im);

  always_ff @(posedge clk) begin
    if (cp_valid) prev_mem[cnt] <= cp_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      have_prev <= 1'b0;
      for (int h = 0; h < 2; h++) begin acc_re[h] <= '0; acc_im[h] <= '0; end
    end else begin
      if (start) have_prev <= 1'b0;
      else if (sym_end) have_prev <= 1'b1;
      if (sym_start) begin
        cnt <= '0;
        for (int h = 0; h < 2; h++) begin acc_re[h] <= '0; acc_im[h] <= '0; end
      end else if (cp_valid) begin
        cnt <= cnt + 1'b1;
        acc_re[cp_upper] <= acc_re[cp_upper] + AW'(p_re);
        acc_im[cp_upper] <= acc_im[cp_upper] + AW'(p_im);
      end
    end
  end

  // one tan^-1 unit, used for the lower half, then the upper half
  logic                 v_in, v_out;
  logic                 sel_up;
  logic signed [AW-1:0] v_re, v_im;
  logic signed [PW-1:0] ang;
  logic [AW:0]          mag_unused;
  logic                 second;
  logic signed [PW-1:0] phi_low;

  cordic_vectoring #(.DW(AW), .PW(PW), .ITER(ITER)) u_atan (
    .clk, .rst_n, .in_valid(v_in), .in_re(v_re), .in_im(v_im),
    .out_valid(v_out), .out_angle(ang), .out_mag(mag_unused));

  assign v_re = acc_re[sel_up];
  assign v_im = acc_im[sel_up];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_in      <= 1'b0;
      sel_up    <= 1'b0;
      second    <= 1'b0;
      phi_low   <= '0;
      est_valid <= 1'b0;
      rcfo_err  <= '0;
      sco_err   <= '0;
    end else begin
      est_valid <= 1'b0;
      v_in      <= 1'b0;
      if (sym_end && have_prev && !start) begin
        v_in   <= 1'b1;    // lower half enters in the next cycle
        sel_up <= 1'b0;
      end else if (v_in && !sel_up) begin
        v_in   <= 1'b1;    // then the upper half
        sel_up <= 1'b1;
      end
      if (v_out) begin
        if (!second) begin
          phi_low <= ang;
          second  <= 1'b1;
        end else begin
          second    <= 1'b0;
          est_valid <= 1'b1;
          rcfo_err  <= (PW+1)'(ang) + (PW+1)'(phi_low);
          sco_err   <= (PW+1)'(ang) - (PW+1)'(phi_low);
        end
      end
    end
  end

endmodule
