// dvbt_pkg: types, constants and helper functions shared by the DVB-T/H
// synchronization datapath.
//
// A baseband sample is a complex number with SW-bit two's-complement real
// and imaginary parts (cplx_t). Phases are unsigned fractions of one turn:
// an N-bit phase p stands for the angle 2*pi*p/2^N, so phase arithmetic
// wraps naturally. The transmission mode (2K/4K/8K FFT) and guard-interval
// length (1/32..1/4 of the FFT length) are carried as small enums; since
// every DVB-T/H GI length is a power of two, helpers return its log2 so
// that "frequency times GI length" becomes a shift.
//
// The carrier counts and continual-pilot counts per mode are those of the
// DVB-T/H standard (ETSI EN 300 744 / EN 302 304). The sample width SW is
// this design's own choice; the document gives no word lengths.
package dvbt_pkg;

  localparam int SW = 12;             // sample word width (assumed)
  localparam int SMAX = (1 << (SW - 1)) - 1;  // largest sample value
  localparam int CIW = 13;            // carrier index width, covers 0..8191

  typedef struct packed {
    logic signed [SW-1:0] re;
    logic signed [SW-1:0] im;
  } cplx_t;

  typedef enum logic [1:0] {MODE_2K = 2'd0, MODE_4K = 2'd1, MODE_8K = 2'd2} fft_mode_e;
  typedef enum logic [1:0] {GI_1_32 = 2'd0, GI_1_16 = 2'd1, GI_1_8 = 2'd2, GI_1_4 = 2'd3} gi_e;

  // stage of the two-stage scattered pilot synchronization in which the
  // current (or next) OFDM symbol is processed
  typedef enum logic [1:0] {
    SPS_IDLE   = 2'd0,   // not started
    SPS_FIRST  = 2'd1,   // 1st SPS: detect the SP mode of this symbol
    SPS_SECOND = 2'd2,   // 2nd SPS: confirm the predicted mode
    SPS_LOCKED = 2'd3    // confirmed: channel estimation may run
  } sps_state_e;

  // log2 of the FFT length
  function automatic logic [3:0] fft_log2(fft_mode_e m);
    case (m)
      MODE_2K: return 4'd11;
      MODE_4K: return 4'd12;
      default: return 4'd13;
    endcase
  endfunction

  // log2 of the guard-interval length in samples
  function automatic logic [3:0] gi_log2(fft_mode_e m, gi_e g);
    return fft_log2(m) - 4'd5 + {2'b00, g};
  endfunction

  // number of active carriers K (indices 0..K-1)
  function automatic logic [CIW-1:0] num_carriers(fft_mode_e m);
    case (m)
      MODE_2K: return CIW'(1705);
      MODE_4K: return CIW'(3409);
      default: return CIW'(6817);
    endcase
  endfunction

  // number of continual pilots
  function automatic logic [7:0] num_cp(fft_mode_e m);
    case (m)
      MODE_2K: return 8'd45;
      MODE_4K: return 8'd89;
      default: return 8'd177;
    endcase
  endfunction

  // atan(2^-i) as a fraction of one turn, scaled by 2^32
  function automatic logic [31:0] cordic_atan(int i);
    case (i)
      0: return 32'd536870912;  1: return 32'd316933406;  2: return 32'd167458907;
      3: return 32'd85004756;   4: return 32'd42667331;   5: return 32'd21354465;
      6: return 32'd10679838;   7: return 32'd5340245;    8: return 32'd2670163;
      9: return 32'd1335087;   10: return 32'd667544;    11: return 32'd333772;
     12: return 32'd166886;    13: return 32'd83443;     14: return 32'd41722;
     15: return 32'd20861;     16: return 32'd10430;     17: return 32'd5215;
     18: return 32'd2608;      19: return 32'd1304;      20: return 32'd652;
     21: return 32'd326;       22: return 32'd163;       23: return 32'd81;
      default: return 32'd0;
    endcase
  endfunction

  // 1/K of the CORDIC gain, K = prod sqrt(1+2^-2i) ~ 1.6468, scaled by 2^16
  localparam int CORDIC_INV_GAIN_Q16 = 39797;

  function automatic logic signed [SW-1:0] sat_sw(logic signed [31:0] v);
    if (v > SMAX) return SW'(SMAX);
    if (v < -SMAX - 1) return SW'(-SMAX - 1);
    return v[SW-1:0];
  endfunction

endpackage
