// pixel_drawer: composes the VGA picture at 65 MHz.
//
// Screen layout (1024x768, counters from xvga):
//   columns   0..319, rows 0..239: own camera picture (self view) with the
//     local effect switches applied;
//   columns 320..639, rows 0..239: in CONNECTED the received video with the
//     effects named in the received effects header; in INCOMING a solid
//     NOTIFY_COLOR box, the incoming-call notification; black otherwise;
//   everything else black.
// Timing: the counters arrive at clock t. rx_fb_addr_out, the read address of
// the received-video frame buffer, is formed from them combinationally; both
// frame buffers return their pixel at t+1, when the counters (delayed one
// clock) select and process it; rgb_out, hsync_out and vsync_out are
// registered and valid at t+2.
// Showing the self view, the received view and a notification follows the
// described design; positions, the notification's form and the per-state
// choices are this design's.
module pixel_drawer
  import fpga_time_pkg::*;
#(
  parameter logic [PIXEL_BITS-1:0] NOTIFY_COLOR = 12'h0F0,
  localparam int unsigned AW = FB_ADDR_BITS
) (
  input  logic                   clk,
  input  logic                   reset_in,
  input  logic [HCOUNT_BITS-1:0] hcount_in,
  input  logic [VCOUNT_BITS-1:0] vcount_in,
  input  logic                   hsync_in,
  input  logic                   vsync_in,
  input  logic                   blank_in,
  input  logic [PIXEL_BITS-1:0]  self_pixel_in,
  input  logic [PIXEL_BITS-1:0]  remote_pixel_in,
  input  call_state_t            fsm_state_in,
  input  logic [3:0]             local_fx_in,
  input  logic [3:0]             remote_fx_in,
  output logic [AW-1:0]          rx_fb_addr_out,
  output logic [PIXEL_BITS-1:0]  rgb_out,
  output logic                   hsync_out,
  output logic                   vsync_out
);

  // stage 0: address of the received view
  always_comb begin
    if (32'(hcount_in) >= VIDEO_WIDTH && 32'(hcount_in) < 2 * VIDEO_WIDTH && 32'(vcount_in) < VIDEO_HEIGHT)
      rx_fb_addr_out = AW'(32'(vcount_in) * VIDEO_WIDTH + 32'(hcount_in) - VIDEO_WIDTH);
    else
      rx_fb_addr_out = '0;
  end

  // stage 1: counters delayed to line up with the frame-buffer data
  logic [HCOUNT_BITS-1:0] h1;
  logic [VCOUNT_BITS-1:0] v1;
  logic                   hs1, vs1, blank1;

  always_ff @(posedge clk) begin
    h1 <= hcount_in;  v1 <= vcount_in;
    hs1 <= hsync_in;  vs1 <= vsync_in;  blank1 <= blank_in;
  end

  logic                  in_self, in_remote;
  logic [8:0]            vx;
  logic [7:0]            vy;
  logic [PIXEL_BITS-1:0] self_fx, remote_fx, pixel;

  assign in_self   = (32'(h1) < VIDEO_WIDTH) && (32'(v1) < VIDEO_HEIGHT);
  assign in_remote = (32'(h1) >= VIDEO_WIDTH) && (32'(h1) < 2 * VIDEO_WIDTH) && (32'(v1) < VIDEO_HEIGHT);
  assign vx = in_remote ? 9'(32'(h1) - VIDEO_WIDTH) : 9'(h1);
  assign vy = 8'(v1);

  video_effects u_self_fx   (.pixel_in(self_pixel_in),   .x_in(vx), .y_in(vy), .effects_in(local_fx_in),  .pixel_out(self_fx));
  video_effects u_remote_fx (.pixel_in(remote_pixel_in), .x_in(vx), .y_in(vy), .effects_in(remote_fx_in), .pixel_out(remote_fx));

  always_comb begin
    pixel = '0;
    if (blank1)         pixel = '0;
    else if (in_self)   pixel = self_fx;
    else if (in_remote) begin
      if (fsm_state_in == CONNECTED)     pixel = remote_fx;
      else if (fsm_state_in == INCOMING) pixel = NOTIFY_COLOR;
    end
  end

  // stage 2: registered outputs
  always_ff @(posedge clk) begin
    if (reset_in) begin
      rgb_out   <= '0;
      hsync_out <= 1'b1;
      vsync_out <= 1'b1;
    end else begin
      rgb_out   <= pixel;
      hsync_out <= hs1;
      vsync_out <= vs1;
    end
  end

endmodule
