// camera_controller: camera frame buffer, self-view pixel and video payloads.
//
// Three clock domains, as in the described design:
//   camera clock (pclk_in): each 16-bit camera pixel is reduced to 12-bit
//     RGB444 and written into a 320x240 frame buffer at a running address
//     that restarts at 0 after each end-of-frame strobe.
//   65 MHz (clk65_mhz): the frame buffer is read at vcount*320+hcount for the
//     XVGA counters inside the 320x240 area (address 0 elsewhere); pixel_out
//     is that word, one clock after the counters. {pixel_out, vcount,
//     hcount} (33 bits, the counters delayed one clock to match the pixel)
//     is written every clock into address 1 of a two-word sync buffer.
//   50 MHz (clk50_mhz): the sync buffer is read at address 1 every clock and
//     the word goes to video_payload_builder, which produces video_out.
// The 16->12 bit reduction keeps the top four bits of each RGB565 field (the
// low bits of each field are intentionally unused); this
// and the in-controller reset synchronisers are this design's choices.
// reset_in belongs to the 50 MHz domain.
module camera_controller
  import fpga_time_pkg::*;
#(
  parameter int unsigned WIDTH  = VIDEO_WIDTH,
  parameter int unsigned HEIGHT = VIDEO_HEIGHT,
  parameter int unsigned BYTES  = VIDEO_BYTES,
  localparam int unsigned DEPTH = WIDTH * HEIGHT,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                   clk50_mhz,
  input  logic                   clk65_mhz,
  input  logic                   pclk_in,
  input  logic                   reset_in,
  input  logic [HCOUNT_BITS-1:0] hcount,
  input  logic [VCOUNT_BITS-1:0] vcount,
  input  logic [15:0]            cam_pixel_in,
  input  logic                   cam_pixel_valid_in,
  input  logic                   cam_frame_done_in,
  input  logic                   camera_off_in,
  output logic [PIXEL_BITS-1:0]  pixel_out,
  output logic [BYTES*8-1:0]     video_out,
  output logic                   valid_video_out
);

  localparam int unsigned SYNC_BITS = PIXEL_BITS + HCOUNT_BITS + VCOUNT_BITS; // 33

  // ---------------- camera clock: frame buffer write ----------------
  logic          reset_cam;
  logic [AW-1:0] wr_addr_q;
  logic [PIXEL_BITS-1:0] processed_pixel;

  cdc_sync #(.WIDTH(1)) u_rst_cam (.clk(pclk_in), .d_in(reset_in), .q_out(reset_cam));

  assign processed_pixel = {cam_pixel_in[15:12], cam_pixel_in[10:7], cam_pixel_in[4:1]};

  always_ff @(posedge pclk_in) begin
    if (reset_cam || cam_frame_done_in) begin
      wr_addr_q <= '0;
    end else if (cam_pixel_valid_in && 32'(wr_addr_q) < DEPTH) begin
      wr_addr_q <= wr_addr_q + 1'b1;
    end
  end

  // ---------------- 65 MHz: self-view read ----------------
  logic [AW-1:0]          rd_addr;
  logic [HCOUNT_BITS-1:0] hcount_d;
  logic [VCOUNT_BITS-1:0] vcount_d;

  always_comb begin
    if (32'(hcount) < WIDTH && 32'(vcount) < HEIGHT)
      rd_addr = AW'(32'(vcount) * WIDTH + 32'(hcount));
    else
      rd_addr = '0;
  end

  dual_port_ram #(.WIDTH(PIXEL_BITS), .DEPTH(DEPTH)) u_frame_buffer (
    .clka (pclk_in),   .wea (cam_pixel_valid_in && !reset_cam && !cam_frame_done_in),
    .addra(wr_addr_q), .dina(processed_pixel),
    .clkb (clk65_mhz), .addrb(rd_addr), .doutb(pixel_out)
  );

  always_ff @(posedge clk65_mhz) begin
    hcount_d <= hcount;
    vcount_d <= vcount;
  end

  // ---------------- 65 MHz -> 50 MHz sync buffer ----------------
  logic [SYNC_BITS-1:0] sync_word;

  dual_port_ram #(.WIDTH(SYNC_BITS), .DEPTH(2)) u_sync_buffer (
    .clka (clk65_mhz), .wea (1'b1), .addra(1'b1), .dina({pixel_out, vcount_d, hcount_d}),
    .clkb (clk50_mhz), .addrb(1'b1), .doutb(sync_word)
  );

  // ---------------- 50 MHz: payload ----------------
  video_payload_builder #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .BYTES(BYTES)) u_builder (
    .clk            (clk50_mhz),
    .reset_in       (reset_in),
    .pixel_in       (sync_word[SYNC_BITS-1 -: PIXEL_BITS]),
    .vcount_in      (sync_word[HCOUNT_BITS +: VCOUNT_BITS]),
    .hcount_in      (sync_word[0 +: HCOUNT_BITS]),
    .camera_off_in  (camera_off_in),
    .video_out      (video_out),
    .valid_video_out(valid_video_out)
  );

endmodule
