// fft_pkg: twiddle-factor table of the multimode FFT.
//
// TW_COS[k] = round(2048 * cos(2*pi*k/8192)) for k = 0..2048, a quarter
// wave for the largest (8K) transform; smaller transforms index it with a
// stride, and sine values are read from the mirrored index. The table is
// computed at elaboration by an integer CORDIC (24 micro-rotations on
// 32-bit turn fractions, gain pre-compensated), so no data file is needed.
// A quarter-wave twiddle ROM is this design's choice; the document only
// reports that the FFT has a ROM.
package fft_pkg;
  import dvbt_pkg::cordic_atan;

  localparam int FFT_LMAX = 13;                   // log2 of the largest FFT
  localparam int FFT_NMAX = 1 << FFT_LMAX;
  localparam int TW_W     = 13;                   // twiddle width (2^11 fits)
  localparam int TW_SHIFT = 11;                   // unit twiddle = 2^11

  typedef logic signed [TW_W-1:0] tw_tab_t [FFT_NMAX/4 + 1];

  function automatic tw_tab_t gen_cos();
    tw_tab_t t;
    for (int k = 0; k <= FFT_NMAX / 4; k++) begin
      longint x, y, z, xn;
      x = 64'sd652032874;                         // 0.6072529 * 2^30
      y = 0;
      z = longint'(k) <<< (32 - FFT_LMAX);        // angle in 2^-32 turn
      for (int i = 0; i < 24; i++) begin
        if (z >= 0) begin
          xn = x - (y >>> i); y = y + (x >>> i); x = xn;
          z = z - longint'(cordic_atan(i));
        end else begin
          xn = x + (y >>> i); y = y - (x >>> i); x = xn;
          z = z + longint'(cordic_atan(i));
        end
      end
      t[k] = TW_W'((x * 2048 + (64'sd1 <<< 29)) >>> 30);
    end
    return t;
  endfunction

  localparam tw_tab_t TW_COS = gen_cos();

endpackage
