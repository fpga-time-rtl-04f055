// rx_line_writer: writes a received video line into the receive frame buffer.
//
// 50 MHz side: on valid_in the received video payload is captured into a
// holding register and a toggle flag flips.
// 65 MHz side: the toggle passes through a two-register synchroniser; on the
// synchronised edge the (by then stable) holding register is copied into the
// 65 MHz domain, and over the next WIDTH clocks pixel i of the payload
// (bits [21+12*i +: 12]) is written to frame-buffer address
// vcount*WIDTH + i, vcount being the start vcount carried in the payload
// (bits [20:11]). Lines whose vcount is outside the picture are ignored.
// lines_written_out counts completed lines (65 MHz domain).
// The described design writes a whole 320-pixel line at the payload's vcount
// on the 65 MHz clock; the toggle handshake is this design's choice. A new
// payload must not arrive within about four 65 MHz clocks of the previous
// one (payloads are at least a 492-byte Ethernet frame apart).
module rx_line_writer
  import fpga_time_pkg::*;
#(
  parameter int unsigned WIDTH  = VIDEO_WIDTH,
  parameter int unsigned HEIGHT = VIDEO_HEIGHT,
  parameter int unsigned BYTES  = VIDEO_BYTES,
  localparam int unsigned AW    = $clog2(WIDTH * HEIGHT)
) (
  input  logic                  clk_50mhz,
  input  logic                  clk_65mhz,
  input  logic                  reset_50_in,
  input  logic                  reset_65_in,
  input  logic [BYTES*8-1:0]    video_in,
  input  logic                  valid_in,
  output logic                  we_out,
  output logic [AW-1:0]         addr_out,
  output logic [PIXEL_BITS-1:0] pixel_out,
  output logic [15:0]           lines_written_out
);

  localparam int unsigned IW = $clog2(WIDTH + 1);

  // 50 MHz side
  logic [BYTES*8-1:0] hold_q;
  logic               toggle_q;

  always_ff @(posedge clk_50mhz) begin
    if (reset_50_in) begin
      toggle_q <= 1'b0;
    end else if (valid_in) begin
      hold_q   <= video_in;
      toggle_q <= !toggle_q;
    end
  end

  // 65 MHz side
  logic               toggle_sync, toggle_seen_q;
  logic [BYTES*8-1:0] line_q;
  logic [IW-1:0]      index_q;
  logic               writing_q;
  logic [VCOUNT_BITS-1:0] line_v;

  cdc_sync #(.WIDTH(1)) u_sync (.clk(clk_65mhz), .d_in(toggle_q), .q_out(toggle_sync));

  assign line_v = line_q[VID_VCOUNT_LSB +: VCOUNT_BITS];

  always_ff @(posedge clk_65mhz) begin
    if (reset_65_in) begin
      toggle_seen_q     <= toggle_sync;
      writing_q         <= 1'b0;
      index_q           <= '0;
      we_out            <= 1'b0;
      addr_out          <= '0;
      pixel_out         <= '0;
      lines_written_out <= '0;
    end else begin
      we_out        <= 1'b0;
      toggle_seen_q <= toggle_sync;
      if (toggle_sync != toggle_seen_q) begin
        line_q    <= hold_q;
        index_q   <= '0;
        writing_q <= 1'b1;
      end else if (writing_q) begin
        if (32'(line_v) < HEIGHT) begin
          we_out    <= 1'b1;
          addr_out  <= AW'(32'(line_v) * WIDTH + 32'(index_q));
          pixel_out <= line_q[VID_PIXEL_LSB + 32'(index_q)*PIXEL_BITS +: PIXEL_BITS];
        end
        if (32'(index_q) == WIDTH - 1) begin
          writing_q <= 1'b0;
          if (32'(line_v) < HEIGHT) lines_written_out <= lines_written_out + 1'b1;
        end
        index_q <= index_q + 1'b1;
      end
    end
  end

endmodule
