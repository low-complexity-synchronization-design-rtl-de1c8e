// hard_demapper: hard-decision demapper producing the undecoded bits.
//
// Maps an equalized carrier to the bits of the nearest constellation point
// of the DVB-T/H non-hierarchical QPSK, 16-QAM or 64-QAM mapping (Gray
// coded per axis): y0/y1 are the signs of the real/imaginary parts (1 =
// negative), for 16-QAM y2/y3 tell whether |re|/|im| is inside the inner
// level, and for 64-QAM y2/y3 tell |x| < 4, y4/y5 tell 2 < |x| < 6, in
// units of UNIT. The input is expected normalized so that the
// constellation levels are the odd multiples of UNIT (+-1, +-3, ...).
// The document only names the hard demapper; the mapping is that of the
// DVB-T/H standard, and UNIT and the interface are this design's choices.
//
// Interface: in_valid/in_data/qam, out_valid/bits/nbits one cycle later;
// bits[i] is y_i, nbits = 2, 4 or 6.
module hard_demapper
  import dvbt_pkg::*;
#(
  parameter int UNIT = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cplx_t       in_data,
  input  logic [1:0]  qam,        // 0: QPSK, 1: 16-QAM, 2: 64-QAM
  output logic        out_valid,
  output logic [5:0]  bits,
  output logic [2:0]  nbits
);
  logic [SW-1:0] ar, ai;   // magnitudes
  assign ar = in_data.re[SW-1] ? SW'(-in_data.re) : SW'(in_data.re);
  assign ai = in_data.im[SW-1] ? SW'(-in_data.im) : SW'(in_data.im);

  logic [5:0] b;
  always_comb begin
    b = '0;
    b[0] = in_data.re[SW-1];
    b[1] = in_data.im[SW-1];
    unique case (qam)
      2'd1: begin
        b[2] = ar < SW'(2 * UNIT);
        b[3] = ai < SW'(2 * UNIT);
      end
      2'd2: begin
        b[2] = ar < SW'(4 * UNIT);
        b[3] = ai < SW'(4 * UNIT);
        b[4] = (ar > SW'(2 * UNIT)) && (ar < SW'(6 * UNIT));
        b[5] = (ai > SW'(2 * UNIT)) && (ai < SW'(6 * UNIT));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      bits      <= '0;
      nbits     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        bits  <= b;
        nbits <= (qam == 2'd2) ? 3'd6 : (qam == 2'd1) ? 3'd4 : 3'd2;
      end
    end
  end

endmodule
