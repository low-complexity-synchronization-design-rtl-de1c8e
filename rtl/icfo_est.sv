// icfo_est: integer carrier frequency offset estimator.
//
// A CFO of an integer number s of carrier spacings moves every carrier by s
// FFT bins. The continual pilots are sent with boosted power at known
// carriers, so the estimator sums the power |Y|^2 found at each pilot
// position shifted by every candidate s in [-S, S] and picks the candidate
// with the largest sum. The pilot positions come from the differentially
// encoded pilot ROM (cp_pos_gen). The bins arrive in order; a (2S+1)-deep
// shift register holds the powers of the last bins, and when the bin
// p + 2S arrives for pilot p, all candidate shifts of that pilot are
// added to their sums at once. The document states only that ICFO is
// estimated in the frequency domain with the pilots; this pilot-power
// search and the range S are this design's choices.
//
// Interface: the bins of one symbol arrive as j = 0 .. K-1+2S, where bin j
// holds carrier j - S when there is no offset (the band widened by S bins
// on both sides), framed by sym_start (with mode) and sym_end. est_valid
// pulses one cycle after sym_end with icfo, the estimated shift in
// carrier spacings (positive: the spectrum appears at higher bins).
module icfo_est
  import dvbt_pkg::*;
#(
  parameter int S   = 8,     // search range in carrier spacings
  parameter int MW  = 40     // metric accumulator width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  fft_mode_e               mode,
  input  logic                    sym_start,
  input  logic                    in_valid,
  input  cplx_t                   in_data,
  input  logic                    sym_end,
  output logic                    est_valid,
  output logic signed [7:0]       icfo
);
  localparam int NC = 2 * S + 1;

  logic [2*SW:0]   pwr;
  logic [2*SW:0]   sr [NC-1];      // sr[0]: power of the previous bin
  logic [MW-1:0]   metric [NC];
  logic [CIW-1:0]  j;
  logic            cp_valid, cp_last;
  logic [CIW-1:0]  cp_pos;
  logic [7:0]      cp_index;
  logic            hit;

  assign pwr = (2*SW+1)'(in_data.re * in_data.re) + (2*SW+1)'(in_data.im * in_data.im);
  assign hit = in_valid && cp_valid && (j == cp_pos + CIW'(2 * S));

  cp_pos_gen u_cp (
    .clk, .rst_n, .start(sym_start), .mode, .next(hit),
    .valid(cp_valid), .pos(cp_pos), .index(cp_index), .last(cp_last));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j <= '0;
      for (int i = 0; i < NC - 1; i++) sr[i] <= '0;
      for (int m = 0; m < NC; m++) metric[m] <= '0;
    end else if (sym_start) begin
      j <= '0;
      for (int i = 0; i < NC - 1; i++) sr[i] <= '0;
      for (int m = 0; m < NC; m++) metric[m] <= '0;
    end else if (in_valid) begin
      j     <= j + 1'b1;
      sr[0] <= pwr;
      for (int i = 1; i < NC - 1; i++) sr[i] <= sr[i-1];
      if (hit) begin
        // bin p + 2S - i holds the pilot moved by s = S - i
        metric[2 * S] <= metric[2 * S] + MW'(pwr);
        for (int i = 1; i < NC; i++)
          metric[2 * S - i] <= metric[2 * S - i] + MW'(sr[i-1]);
      end
    end
  end

  // arg max of the candidate sums
  logic [$clog2(NC)-1:0] best;
  always_comb begin
    best = '0;
    for (int m = 1; m < NC; m++)
      if (metric[m] > metric[best]) best = ($clog2(NC))'(m);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est_valid <= 1'b0;
      icfo      <= '0;
    end else begin
      est_valid <= sym_end;
      if (sym_end) icfo <= 8'(signed'({1'b0, best})) - 8'(S);
    end
  end

endmodule
