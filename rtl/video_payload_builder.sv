// video_payload_builder: packs one camera line into a 483-byte video payload.
//
// Runs in the 50 MHz domain on the {pixel, hcount, vcount} words that the
// sync buffer carries over from the 65 MHz display counters. While the
// counters are inside the 320x240 camera area it:
//   * waits, with an empty payload, until hcount is 0 (so a payload starts
//     at the left edge of a line);
//   * then stores one 12-bit pixel per clock at a 12-bit payload index that
//     advances by 12;
//   * once 320 pixels (3840 bits) are stored, emits
//       video_out = {3'b0, pixels, start_vcount, start_hcount}
//     with pixel i in bits [21+12*i +: 12], start_vcount in [20:11] and
//     start_hcount in [10:0], and pulses valid_video_out for one clock.
// Outside the camera area nothing is stored. The start counts are the counts
// seen while the index is 0, i.e. those of the first stored pixel. With
// camera_off_in the pixel field of the emitted payload is all zero.
// All of this follows the described design, including that the 50 MHz
// sampler sees only about 50/65 of the 65 MHz counter values, so a payload
// can run past the end of a line and continue on the next one.
// This design's own choices: valid_video_out is a one-clock pulse, the three
// spare top bits are zero, and reset clears the index.
module video_payload_builder
  import fpga_time_pkg::*;
#(
  parameter int unsigned WIDTH  = VIDEO_WIDTH,
  parameter int unsigned HEIGHT = VIDEO_HEIGHT,
  parameter int unsigned BYTES  = VIDEO_BYTES,
  localparam int unsigned LBITS = WIDTH * PIXEL_BITS
) (
  input  logic                   clk,
  input  logic                   reset_in,
  input  logic [PIXEL_BITS-1:0]  pixel_in,
  input  logic [HCOUNT_BITS-1:0] hcount_in,
  input  logic [VCOUNT_BITS-1:0] vcount_in,
  input  logic                   camera_off_in,
  output logic [BYTES*8-1:0]     video_out,
  output logic                   valid_video_out
);

  localparam int unsigned PAD = BYTES*8 - LBITS - HCOUNT_BITS - VCOUNT_BITS;

  logic [LBITS-1:0]       line_q;
  logic [11:0]            index_q;
  logic                   building_q;
  logic [HCOUNT_BITS-1:0] start_h_q;
  logic [VCOUNT_BITS-1:0] start_v_q;
  logic                   in_area;

  assign in_area = (32'(hcount_in) < WIDTH) && (32'(vcount_in) < HEIGHT);

  always_ff @(posedge clk) begin
    if (reset_in) begin
      index_q         <= '0;
      building_q      <= 1'b0;
      valid_video_out <= 1'b0;
      video_out       <= '0;
      start_h_q       <= '0;
      start_v_q       <= '0;
    end else begin
      valid_video_out <= 1'b0;
      if (in_area) begin
        if (32'(index_q) >= LBITS) begin
          video_out       <= {PAD'(0), camera_off_in ? LBITS'(0) : line_q, start_v_q, start_h_q};
          valid_video_out <= 1'b1;
          index_q         <= '0;
          building_q      <= 1'b0;
        end else if (building_q || hcount_in == '0) begin
          line_q[index_q +: PIXEL_BITS] <= pixel_in;
          index_q    <= index_q + 12'(PIXEL_BITS);
          building_q <= 1'b1;
        end
        if (index_q == '0) begin
          start_h_q <= hcount_in;
          start_v_q <= vcount_in;
        end
      end
    end
  end

endmodule
