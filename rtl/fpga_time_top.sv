// fpga_time_top: one FPGA of a two-party FPGA video call.
//
// Two of these, joined by an Ethernet link, let two people see and hear each
// other. Each FPGA captures its camera into a frame buffer (shown as the
// self view), cuts the picture into one-line video payloads, adds 8 bytes of
// filtered microphone audio, its call action and its effect switches, and
// hands the 492-byte payload to a UDP send module. Received payloads are
// split again: the line goes into a second frame buffer at its own row and is
// drawn beside the self view with the sender's effects; the audio is filtered
// and played; the action drives the call state machine.
//
// Clock domains: clk_50mhz (Ethernet side, audio, call state machine,
// payload assembly), clk_65mhz (1024x768 XVGA drawing), cam_pclk_in (camera
// writes). reset_in is synchronised into the 50 and 65 MHz domains and the
// camera domain. Switches and buttons are synchronised into 50 MHz; the call
// state and the effect words cross to 65 MHz through two-register
// synchronisers.
//
// Outside this module: the camera-read logic that turns camera bytes into
// 16-bit pixels (cam_pixel_in/_valid_in/_frame_done_in), the UDP send and
// receive modules (eth_tx_*/eth_rx_*: payload, send strobe, busy, receive
// strobe), the microphone ADC (mic_in, signed, 50 MHz domain), the clock
// generator, the VGA connector and the audio output filter (audio_pwm_out).
//
// The random-noise audio effect is applied on the receiving side (playback),
// from the received effects header; the microphone-side noise input of the
// audio controller is therefore held low.
// Two status counters have no port and are left for probing in simulation
// or a logic analyser: packets_dropped (video payloads not sent because the
// sender was busy) and rx_lines_written (received lines stored).
module fpga_time_top
  import fpga_time_pkg::*;
(
  input  logic                    clk_50mhz,
  input  logic                    clk_65mhz,
  input  logic                    reset_in,
  // camera-read outputs
  input  logic                    cam_pclk_in,
  input  logic [15:0]             cam_pixel_in,
  input  logic                    cam_pixel_valid_in,
  input  logic                    cam_frame_done_in,
  // microphone
  input  logic [7:0]              mic_in,
  // buttons and switches
  input  logic                    btn_initiate_in,
  input  logic                    btn_accept_in,
  input  logic                    btn_deny_in,
  input  logic                    btn_end_in,
  input  logic [3:0]              sw_effects_in,
  input  logic                    sw_mute_in,
  input  logic                    sw_camera_off_in,
  input  logic                    sw_filter_in,
  // UDP send / receive modules
  output logic [PAYLOAD_BITS-1:0] eth_tx_payload_out,
  output logic                    eth_tx_send_out,
  input  logic                    eth_tx_busy_in,
  input  logic [PAYLOAD_BITS-1:0] eth_rx_payload_in,
  input  logic                    eth_rx_valid_in,
  // VGA
  output logic [3:0]              vga_r_out,
  output logic [3:0]              vga_g_out,
  output logic [3:0]              vga_b_out,
  output logic                    vga_hs_out,
  output logic                    vga_vs_out,
  // audio and status
  output logic [7:0]              audio_sample_out,
  output logic                    audio_pwm_out,
  output logic [1:0]              fsm_state_out
);

  // ---------------- resets and input synchronisers ----------------
  logic rst50, rst65;
  cdc_sync #(.WIDTH(1)) u_rst50 (.clk(clk_50mhz), .d_in(reset_in), .q_out(rst50));
  cdc_sync #(.WIDTH(1)) u_rst65 (.clk(clk_65mhz), .d_in(reset_in), .q_out(rst65));

  logic       initiate, accept, deny, hang_up, mute, camera_off, filter_en;
  logic [3:0] local_fx;
  cdc_sync #(.WIDTH(11)) u_sw_sync (
    .clk  (clk_50mhz),
    .d_in ({btn_initiate_in, btn_accept_in, btn_deny_in, btn_end_in, sw_effects_in, sw_mute_in, sw_camera_off_in, sw_filter_in}),
    .q_out({initiate, accept, deny, hang_up, local_fx, mute, camera_off, filter_en})
  );

  // ---------------- display timing ----------------
  logic [HCOUNT_BITS-1:0] hcount;
  logic [VCOUNT_BITS-1:0] vcount;
  logic                   hsync, vsync, blank;
  xvga u_xvga (.clk(clk_65mhz), .reset_in(rst65), .hcount(hcount), .vcount(vcount), .hsync(hsync), .vsync(vsync), .blank(blank));

  // ---------------- camera controller ----------------
  logic [PIXEL_BITS-1:0] self_pixel;
  logic [VIDEO_BITS-1:0] video_payload;
  logic                  video_valid;
  camera_controller u_camera (
    .clk50_mhz(clk_50mhz), .clk65_mhz(clk_65mhz), .pclk_in(cam_pclk_in), .reset_in(rst50),
    .hcount(hcount), .vcount(vcount),
    .cam_pixel_in(cam_pixel_in), .cam_pixel_valid_in(cam_pixel_valid_in), .cam_frame_done_in(cam_frame_done_in),
    .camera_off_in(camera_off), .pixel_out(self_pixel), .video_out(video_payload), .valid_video_out(video_valid)
  );

  // ---------------- audio controller ----------------
  logic                  sample_trigger;
  logic [AUDIO_BITS-1:0] audio_payload;
  logic                  audio_valid;
  audio_sample_trigger u_trigger (.clk(clk_50mhz), .reset_in(rst50), .trigger_out(sample_trigger));
  audio_controller u_audio (
    .clk_50mhz(clk_50mhz), .reset_in(rst50), .apply_echo_in(1'b0), .mute_in(mute), .filter_in(filter_en),
    .audio_sample_trigger_in(sample_trigger), .mic_in(mic_in), .valid_audio_out(audio_valid), .audio_out(audio_payload)
  );

  // ---------------- call state and action header ----------------
  call_state_t           fsm_state;
  action_t               tx_action;
  logic                  packet_sent;
  logic [15:0]           packets_dropped;
  logic [VIDEO_BITS-1:0] rx_video;
  logic [AUDIO_BITS-1:0] rx_audio;
  logic [3:0]            rx_action, rx_effects;
  logic                  rx_valid;

  display_fsm u_fsm (
    .clk_50mhz(clk_50mhz), .reset_in(rst50), .action_in(rx_action), .action_valid_in(rx_valid),
    .deny_in(deny), .accept_in(accept), .initiates_in(initiate), .ends_in(hang_up), .fsm_state(fsm_state)
  );
  action_encoder u_action (
    .clk(clk_50mhz), .reset_in(rst50), .fsm_state_in(fsm_state), .accept_in(accept), .deny_in(deny), .ends_in(hang_up),
    .sent_in(packet_sent), .action_out(tx_action)
  );
  assign fsm_state_out = fsm_state;

  // ---------------- ethernet controller ----------------
  ethernet_controller u_ethernet (
    .clk_50mhz(clk_50mhz), .reset_in(rst50),
    .video_in(video_payload), .valid_video_in(video_valid), .audio_in(audio_payload), .valid_audio_in(audio_valid),
    .action_in(tx_action), .effects_in(local_fx), .busy_in(eth_tx_busy_in),
    .payload_out(eth_tx_payload_out), .send_out(eth_tx_send_out), .sent_out(packet_sent), .dropped_out(packets_dropped),
    .payload_in(eth_rx_payload_in), .valid_data_in(eth_rx_valid_in),
    .rx_video_out(rx_video), .rx_audio_out(rx_audio), .rx_action_out(rx_action), .rx_effects_out(rx_effects), .rx_valid_out(rx_valid)
  );

  // ---------------- audio playback ----------------
  audio_playback u_playback (
    .clk(clk_50mhz), .reset_in(rst50), .trigger_in(sample_trigger), .fsm_state_in(fsm_state),
    .audio_payload_in(rx_audio), .noise_in(rx_effects[FX_NOISE]), .mic_in(mic_in),
    .sample_out(audio_sample_out), .pwm_out(audio_pwm_out)
  );

  // ---------------- received video: 50 -> 65 MHz and frame buffer ----------------
  logic                    rx_we;
  logic [FB_ADDR_BITS-1:0] rx_waddr, rx_raddr;
  logic [PIXEL_BITS-1:0]   rx_wpixel, remote_pixel;
  logic [15:0]             rx_lines_written;

  rx_line_writer u_rx_writer (
    .clk_50mhz(clk_50mhz), .clk_65mhz(clk_65mhz), .reset_50_in(rst50), .reset_65_in(rst65),
    .video_in(rx_video), .valid_in(rx_valid),
    .we_out(rx_we), .addr_out(rx_waddr), .pixel_out(rx_wpixel), .lines_written_out(rx_lines_written)
  );

  dual_port_ram #(.WIDTH(PIXEL_BITS), .DEPTH(FB_DEPTH)) u_rx_frame_buffer (
    .clka(clk_65mhz), .wea(rx_we), .addra(rx_waddr), .dina(rx_wpixel),
    .clkb(clk_65mhz), .addrb(rx_raddr), .doutb(remote_pixel)
  );

  // ---------------- drawing ----------------
  logic [1:0] fsm_state_65;
  logic [3:0] local_fx_65, remote_fx_65;
  cdc_sync #(.WIDTH(10)) u_to_65 (
    .clk(clk_65mhz), .d_in({fsm_state, local_fx, rx_effects}), .q_out({fsm_state_65, local_fx_65, remote_fx_65})
  );

  logic [PIXEL_BITS-1:0] rgb;
  pixel_drawer u_drawer (
    .clk(clk_65mhz), .reset_in(rst65), .hcount_in(hcount), .vcount_in(vcount),
    .hsync_in(hsync), .vsync_in(vsync), .blank_in(blank),
    .self_pixel_in(self_pixel), .remote_pixel_in(remote_pixel), .fsm_state_in(call_state_t'(fsm_state_65)),
    .local_fx_in(local_fx_65), .remote_fx_in(remote_fx_65),
    .rx_fb_addr_out(rx_raddr), .rgb_out(rgb), .hsync_out(vga_hs_out), .vsync_out(vga_vs_out)
  );
  assign {vga_r_out, vga_g_out, vga_b_out} = rgb;

endmodule
