// cp_pos_gen: continual pilot position generator using a differentially
// encoded ROM.
//
// Instead of storing the carrier index of each of the 177 continual pilots
// of 8K mode (177 x 13 bits), the ROM stores the distance from each pilot
// to the next. These distances repeat with a period of 44 pilots (1704
// carriers), and 2K, 4K and 8K mode use the first 45, 89 and 177 pilots of
// the same sequence, so one period, 45 entries of 8 bits, serves all
// modes. The ROM is sized to the next power of two, 64 x 8 bits, the rest
// being zero. An accumulator adds the distances and a small control unit
// walks the ROM address, wrapping from entry 44 back to entry 1. This is
// the document's differential encoding scheme; the distances themselves
// are the continual pilot positions of the DVB-T/H standard.
//
// Interface: start (with mode) loads the first position, 0; each next
// pulse advances to the following pilot. pos is valid while valid is high;
// last marks the final pilot of the mode. A next on the last pilot ends
// the sequence (valid low). One position per cycle at most.
module cp_pos_gen
  import dvbt_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  fft_mode_e      mode,
  input  logic           next,
  output logic           valid,
  output logic [CIW-1:0] pos,
  output logic [7:0]     index,   // ordinal of the pilot, 0-based
  output logic           last
);
  // ROM: entry 0 is the first pilot (carrier 0), entries 1..44 are the
  // distances between consecutive pilots of one 1704-carrier period.
  localparam logic [7:0] ROM [64] = '{
      8'd0,
      8'd48, 8'd6,  8'd33, 8'd54, 8'd15, 8'd36,  8'd9,   8'd54, 8'd24, 8'd3,  8'd51,
      8'd99, 8'd18, 8'd33, 8'd42, 8'd6,  8'd87,  8'd18,  8'd78, 8'd45, 8'd6,  8'd15,
      8'd24, 8'd69, 8'd15, 8'd30, 8'd21, 8'd3,   8'd27,  8'd15, 8'd66, 8'd51, 8'd6,
      8'd3,  8'd27, 8'd3,  8'd6,  8'd60, 8'd63,  8'd54,  8'd54, 8'd114, 8'd192, 8'd21,
      8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0,
      8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0};
  localparam logic [5:0] LAST_ADDR = 6'd44;

  logic [5:0] addr;
  logic [7:0] total;
  fft_mode_e  mode_q;

  assign total = num_cp(mode_q);
  assign last  = valid && (index == total - 8'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= 1'b0;
      pos    <= '0;
      index  <= '0;
      addr   <= 6'd1;
      mode_q <= MODE_2K;
    end else if (start) begin
      valid  <= 1'b1;
      pos    <= CIW'(ROM[0]);
      index  <= '0;
      addr   <= 6'd1;
      mode_q <= mode;
    end else if (next && valid) begin
      if (last) begin
        valid <= 1'b0;
      end else begin
        pos   <= pos + CIW'(ROM[addr]);   // the accumulator
        index <= index + 8'd1;
        addr  <= (addr == LAST_ADDR) ? 6'd1 : addr + 6'd1;
      end
    end
  end

endmodule
