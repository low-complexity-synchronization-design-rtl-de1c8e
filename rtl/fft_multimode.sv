// fft_multimode: 2K/4K/8K FFT for the OFDM demodulator.
//
// Thirteen radix-2 decimation-in-frequency SDF stages (fft_sdf_stage) with
// delay lines of 4096, 2048, ..., 1 samples form a streaming pipeline
// that accepts one sample per valid cycle. For 4K and 2K mode the first
// one or two stages are bypassed. Twiddle factors come from a quarter-wave
// table (fft_pkg). Each stage halves its results, so the pipeline output
// is X(k) * 2^11 / N for inputs scaled by 2^11; a final shift brings it to
// about X(k)/sqrt(N) (exactly 1/sqrt(N) in 4K mode, 0.71/sqrt(N) in 2K and
// 8K mode), saturated to the sample width.
//
// The pipeline delivers each symbol in bit-reversed order. A two-bank
// reorder memory collects one symbol while the other is read out, at one
// bin per clock, in centred order: bin -N/2 first, then up to N/2-1, so
// that the carriers come out in ascending carrier order. The document
// names only a 2K/4K/8K multimode FFT; the SDF architecture, the table and
// the scaling are this design's choices.
//
// Interface: in_valid/in_data/in_sof (sof on the first sample of each
// symbol; gaps allowed). out_valid/out_data with out_bin (bin number +
// N/2, i.e. 0 .. N-1 in centred order), out_sof/out_eof on the first/last
// bin. A symbol leaves once the following symbol has flowed through the
// pipeline (its last samples are pushed out by the next symbol's first N
// samples), then takes N cycles to be read out.
module fft_multimode
  import dvbt_pkg::*;
  import fft_pkg::*;
#(
  parameter int W = 24   // internal word width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  fft_mode_e             mode,
  input  logic                  in_valid,
  input  cplx_t                 in_data,
  input  logic                  in_sof,
  output logic                  out_valid,
  output cplx_t                 out_data,
  output logic [FFT_LMAX-1:0]   out_bin,
  output logic                  out_sof,
  output logic                  out_eof
);
  localparam int LMAX = FFT_LMAX;
  localparam int NMAX = FFT_NMAX;

  logic [3:0] lg;
  assign lg = fft_log2(mode);

  // stage chain
  logic                v  [LMAX+1];
  logic                sf [LMAX+1];
  logic signed [W-1:0] re [LMAX+1];
  logic signed [W-1:0] im [LMAX+1];

  assign v[0]  = in_valid;
  assign sf[0] = in_sof;
  assign re[0] = W'(in_data.re) <<< TW_SHIFT;
  assign im[0] = W'(in_data.im) <<< TW_SHIFT;

  for (genvar s = 0; s < LMAX; s++) begin : g_stage
    fft_sdf_stage #(.D(NMAX >> (s + 1)), .W(W)) u_stage (
      .clk, .rst_n,
      .bypass   (s < LMAX - int'(lg)),
      .in_valid (v[s]),  .in_re (re[s]),  .in_im (im[s]),  .in_sof (sf[s]),
      .out_valid(v[s+1]), .out_re(re[s+1]), .out_im(im[s+1]), .out_sof(sf[s+1]));
  end

  // final scaling to about 1/sqrt(N)
  logic [3:0] fsh;
  logic signed [W-1:0] fr, fi;
  assign fsh = 4'(TW_SHIFT) - (lg >> 1);
  assign fr = re[LMAX] >>> fsh;
  assign fi = im[LMAX] >>> fsh;

  // reorder memory: two banks, write bit-reversed, read centred
  cplx_t rmem [2*NMAX];   // {bank, address}
  logic          wbank, rbank, rd_busy;
  logic [LMAX:0] wcnt, rcnt;
  logic [LMAX-1:0] waddr, raddr;
  logic [LMAX:0] nlen;
  logic          started;
  assign nlen = (LMAX+1)'(1) << lg;

  // bit reversal over lg bits
  always_comb begin
    logic [LMAX-1:0] c;
    c = sf[LMAX] ? '0 : wcnt[LMAX-1:0];
    waddr = '0;
    for (int b = 0; b < LMAX; b++)
      if (b < int'(lg)) waddr[int'(lg) - 1 - b] = c[b];
  end
  // centred read: output i is bin i - N/2, stored at (i + N/2) mod N
  assign raddr = LMAX'((rcnt + {1'b0, nlen[LMAX:1]}) & (nlen - 1'b1));

  always_ff @(posedge clk) begin
    if (v[LMAX] && (started || sf[LMAX])) begin
      rmem[{wbank, waddr}] <= '{re: sat_sw(32'(fr)), im: sat_sw(32'(fi))};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank     <= 1'b0;
      rbank     <= 1'b0;
      rd_busy   <= 1'b0;
      wcnt      <= '0;
      rcnt      <= '0;
      started   <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_bin   <= '0;
      out_sof   <= 1'b0;
      out_eof   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_eof   <= 1'b0;
      if (v[LMAX] && (started || sf[LMAX])) begin
        started <= 1'b1;
        if ((sf[LMAX] ? '0 : wcnt) == nlen - 1) begin
          // symbol complete: hand the bank to the reader
          wcnt    <= '0;
          wbank   <= ~wbank;
          rbank   <= wbank;
          rd_busy <= 1'b1;
          rcnt    <= '0;
        end else begin
          wcnt <= (sf[LMAX] ? '0 : wcnt) + 1'b1;
        end
      end
      if (rd_busy) begin
        out_valid <= 1'b1;
        out_data  <= rmem[{rbank, raddr}];
        out_bin   <= rcnt[LMAX-1:0];
        out_sof   <= (rcnt == '0);
        out_eof   <= (rcnt == nlen - 1);
        if (rcnt == nlen - 1) rd_busy <= 1'b0;
        else rcnt <= rcnt + 1'b1;
      end
    end
  end

endmodule
