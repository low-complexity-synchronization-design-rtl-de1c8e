// symbol_sync: OFDM symbol boundary detection and fractional CFO
// estimation from the cyclic prefix.
//
// The guard interval is a copy of the last N_GI samples of the symbol, so
// the delay correlation p(n) = r(n) * conj(r(n-N)), summed over a sliding
// window of N_GI samples, C(n) = sum p(n-N_GI+1 .. n), peaks in magnitude
// when the window covers the guard interval and its copy, i.e. at the
// last sample of an OFDM symbol. The angle of C at the peak is 2*pi times
// the fractional CFO in carrier spacings. The module observes windows of
// one symbol period (N + N_GI samples), finds the peak of |re C|+|im C| in
// each and reports it; one CORDIC tan^-1 unit then gives the FCFO.
//
// Memories: an N-sample delay line (NMAX deep) and an N_GI-product
// circular buffer (GMAX deep) for the sliding sum. The document describes
// the joint Mode/GI/symbol detection only by reference; here the mode and
// GI length are inputs and only the boundary and FCFO are detected (the
// mode/GI search is not built). Word widths are this design's choices.
//
// Interface: start (with mode and gi held) restarts detection; in_valid/
// in_data is the sample stream. At the end of each observation window
// found pulses with sym_phase, the position of the sample just taken in
// within its OFDM symbol (0 = first GI sample), and peak_mag. fcfo_valid
// follows about 18 cycles later with fcfo, the FCFO in units of 2^-PW
// carrier spacings.
module symbol_sync
  import dvbt_pkg::*;
#(
  parameter int NMAX = 8192,
  parameter int GMAX = 2048,
  parameter int CW   = 40,   // correlation sum width
  parameter int PW   = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  fft_mode_e             mode,
  input  gi_e                   gi,
  input  logic                  in_valid,
  input  cplx_t                 in_data,
  output logic                  found,
  output logic [CIW:0]          sym_phase,
  output logic [CW-1:0]         peak_mag,
  output logic                  fcfo_valid,
  output logic signed [PW-1:0]  fcfo
);
  localparam int NB = $clog2(NMAX);
  localparam int GB = $clog2(GMAX);
  localparam int PWD = 2 * SW + 1;     // product width

  logic [NB:0]   n_len;
  logic [GB:0]   g_len;
  logic [NB+1:0] l_len;
  assign n_len = (NB+1)'(1) << fft_log2(mode);
  assign g_len = (GB+1)'(1) << gi_log2(mode, gi);
  assign l_len = (NB+2)'(n_len) + (NB+2)'(g_len);

  cplx_t dmem [NMAX];
  logic signed [PWD-1:0] pmem_re [GMAX];
  logic signed [PWD-1:0] pmem_im [GMAX];
  logic [NB-1:0] dptr;
  logic [GB-1:0] gptr;
  logic [NB:0]   nfill;              // samples in the delay line
  logic [GB:0]   nprod;              // products in the sliding window
  logic [NB+1:0] w, wpk;             // position in the observation window
  logic signed [CW-1:0] c_re, c_im, pk_re, pk_im;

  cplx_t old;
  logic signed [PWD-1:0] p_re, p_im, q_re, q_im;
  logic signed [CW-1:0]  cn_re, cn_im;
  logic [CW-1:0]         cn_mag;
  logic                  have_prod, full_win;

  assign old = dmem[dptr];
  assign p_re = PWD'(in_data.re * old.re) + PWD'(in_data.im * old.im);
  assign p_im = PWD'(in_data.im * old.re) - PWD'(in_data.re * old.im);
  assign have_prod = (nfill == n_len);
  assign full_win  = (nprod == g_len);
  assign q_re = full_win ? pmem_re[gptr] : '0;
  assign q_im = full_win ? pmem_im[gptr] : '0;
  assign cn_re = c_re + CW'(p_re) - CW'(q_re);
  assign cn_im = c_im + CW'(p_im) - CW'(q_im);
  assign cn_mag = (cn_re[CW-1] ? CW'(-cn_re) : CW'(cn_re)) +
                  (cn_im[CW-1] ? CW'(-cn_im) : CW'(cn_im));

  always_ff @(posedge clk) begin
    if (in_valid) begin
      dmem[dptr] <= in_data;
      if (have_prod) begin
        pmem_re[gptr] <= p_re;
        pmem_im[gptr] <= p_im;
      end
    end
  end

  logic start_fc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dptr <= '0; gptr <= '0; nfill <= '0; nprod <= '0;
      w <= '0; wpk <= '0; c_re <= '0; c_im <= '0;
      pk_re <= '0; pk_im <= '0; peak_mag <= '0;
      found <= 1'b0; sym_phase <= '0; start_fc <= 1'b0;
    end else begin
      found    <= 1'b0;
      start_fc <= 1'b0;
      if (start) begin
        dptr <= '0; gptr <= '0; nfill <= '0; nprod <= '0;
        w <= '0; c_re <= '0; c_im <= '0; peak_mag <= '0;
      end else if (in_valid) begin
        dptr <= (dptr == NB'(n_len - 1)) ? '0 : dptr + 1'b1;
        if (!have_prod) nfill <= nfill + 1'b1;
        if (have_prod) begin
          gptr <= (gptr == GB'(g_len - 1)) ? '0 : gptr + 1'b1;
          if (!full_win) nprod <= nprod + 1'b1;
          c_re <= cn_re;
          c_im <= cn_im;
          if (full_win) begin
            // search for the peak over one symbol period
            if (w == '0 || cn_mag > peak_mag) begin
              peak_mag <= cn_mag;
              wpk      <= w;
              pk_re    <= cn_re;
              pk_im    <= cn_im;
            end
            if (w == l_len - 1) begin
              w        <= '0;
              found    <= 1'b1;
              start_fc <= 1'b1;
              // the peak sample ends a symbol; phase of the current one
              if (!(w == '0 || cn_mag > peak_mag) && wpk != l_len - 1)
                sym_phase <= (CIW+1)'(l_len - 2 - wpk);
              else
                sym_phase <= (CIW+1)'(l_len - 1);
            end else begin
              w <= w + 1'b1;
            end
          end
        end
      end
    end
  end

  // the peak value is complete in the cycle after found
  logic [CW:0] mag_unused;
  cordic_vectoring #(.DW(CW), .PW(PW), .ITER(16)) u_atan (
    .clk, .rst_n, .in_valid(start_fc), .in_re(pk_re), .in_im(pk_im),
    .out_valid(fcfo_valid), .out_angle(fcfo), .out_mag(mag_unused));

endmodule
