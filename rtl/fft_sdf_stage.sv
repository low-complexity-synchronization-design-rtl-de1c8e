// fft_sdf_stage: one radix-2 decimation-in-frequency single-path
// delay-feedback (SDF) stage of the multimode FFT.
//
// The stage sees frames (OFDM symbols) as blocks of 2D samples. During the
// first half of a block it stores the incoming samples in a D-deep delay
// line and emits the differences left there by the previous block,
// multiplied by the twiddle factor exp(-j*2*pi*i/(2D)) of their position i
// in the half block. During the second half it adds each incoming sample
// to its stored partner a: a+x goes out, a-x goes into the delay line.
// Sums and differences are halved to keep the word within W bits. A frame
// thus leaves the stage D samples after it entered; out_sof marks its
// first sample. The stage moves only on valid samples, so the input may
// have gaps. When bypass is high (the stage is not needed for a smaller
// FFT) samples pass through with one register delay.
//
// Interface: in_valid/in_re/in_im/in_sof -> out_valid/out_re/out_im/
// out_sof, registered. Nothing is output until the first frame's first D
// samples have been stored.
module fft_sdf_stage
  import fft_pkg::*;
#(
  parameter int D = 4096,  // delay line length (half block)
  parameter int W = 24     // data width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bypass,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  input  logic                in_sof,
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im,
  output logic                out_sof
);
  localparam int DB = (D > 1) ? $clog2(D) : 1;

  logic signed [W-1:0] dl_re [D];
  logic signed [W-1:0] dl_im [D];
  logic [DB-1:0]  ptr;
  logic [DB:0]    pos, pos_q;       // position in the 2D block
  logic [FFT_LMAX:0] fpos, fpos_q;  // position in the frame
  logic           primed;

  assign pos  = in_sof ? '0 : pos_q;
  assign fpos = in_sof ? '0 : fpos_q;

  logic signed [W-1:0] a_re, a_im;
  logic signed [W:0]   s_re, s_im, d_re, d_im;
  logic                second_half;
  assign a_re = dl_re[ptr];
  assign a_im = dl_im[ptr];
  assign second_half = pos[DB] || (D == 1 && pos[0]);
  assign s_re = (W+1)'(a_re) + (W+1)'(in_re);
  assign s_im = (W+1)'(a_im) + (W+1)'(in_im);
  assign d_re = (W+1)'(a_re) - (W+1)'(in_re);
  assign d_im = (W+1)'(a_im) - (W+1)'(in_im);

  // twiddle exp(-j*2*pi*i/(2D)) = c - j*s, table index k = i*NMAX/(2D)
  localparam int STRIDE = FFT_NMAX / (2 * D);
  localparam int Q = FFT_NMAX / 4;
  logic [FFT_LMAX-1:0] k;
  logic signed [TW_W-1:0] tc, ts;
  assign k = FFT_LMAX'(int'(ptr) * STRIDE);
  // fold the angle into the first quadrant: one table read for each of
  // cos and sin
  logic                 k_hi;
  logic [FFT_LMAX-2:0]  ic, is;
  logic signed [TW_W-1:0] rc, rs;
  assign k_hi = (int'(k) > Q);
  assign ic   = (FFT_LMAX-1)'(k_hi ? 2 * Q - int'(k) : int'(k));
  assign is   = (FFT_LMAX-1)'(k_hi ? int'(k) - Q : Q - int'(k));
  assign rc   = TW_COS[ic];
  assign rs   = TW_COS[is];
  assign tc   = k_hi ? -rc : rc;
  assign ts   = rs;

  // (a_re + j a_im)(tc - j ts)
  logic signed [W+TW_W:0] m_re, m_im;
  assign m_re = (W+TW_W+1)'(a_re * tc) + (W+TW_W+1)'(a_im * ts);
  assign m_im = (W+TW_W+1)'(a_im * tc) - (W+TW_W+1)'(a_re * ts);

  always_ff @(posedge clk) begin
    if (in_valid && !bypass) begin
      if (second_half) begin
        dl_re[ptr] <= d_re[W:1];
        dl_im[ptr] <= d_im[W:1];
      end else begin
        dl_re[ptr] <= in_re;
        dl_im[ptr] <= in_im;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      pos_q     <= '0;
      fpos_q    <= '0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_sof   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      if (in_valid) begin
        if (bypass) begin
          out_valid <= 1'b1;
          out_re    <= in_re;
          out_im    <= in_im;
          out_sof   <= in_sof;
        end else begin
          ptr    <= (int'(ptr) == D - 1) ? '0 : ptr + 1'b1;
          pos_q  <= (int'(pos) == 2 * D - 1) ? '0 : pos + 1'b1;
          fpos_q <= fpos + 1'b1;
          if (second_half) begin
            primed    <= 1'b1;
            out_valid <= 1'b1;
            out_re    <= s_re[W:1];
            out_im    <= s_im[W:1];
            out_sof   <= (int'(fpos) == D);
          end else begin
            out_valid <= primed;
            out_re    <= W'(m_re >>> TW_SHIFT);
            out_im    <= W'(m_im >>> TW_SHIFT);
          end
        end
      end
    end
  end

endmodule
