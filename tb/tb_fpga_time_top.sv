// tb_fpga_time_top: two FPGA-Time units, A and B, joined by a link model in
// each direction, each with its own camera model and microphone signal, all
// parameters at their defaults. The call script:
//   1. A presses call; B must show INCOMING (notification drawn, ring tone
//      played) while A is CALLING. B denies; both return to IDLE.
//   2. A calls again; B accepts; both reach CONNECTED.
//   3. Connected for about one display frame with all four effects switched
//      on at A: every packet B receives must carry A's effects, a line tag
//      with start hcount 0, and a first pixel equal to A's camera pixel at
//      column 0 of that row, followed by columns that step by 1 or 2 until,
//      between pixels 230 and 260, the payload continues with the next row
//      (the line spill of the 50 MHz sampler); B's receive frame buffer must hold the last line
//      received for each row; B must play non-silent audio and draw A's
//      effects.
//   4. A mutes and switches its camera off: B must receive zero audio and
//      blank lines.
//   5. B hangs up; both return to IDLE.
// Every mechanism (call, incoming, deny, accept, end, tone, notification,
// line write, effects, mute, camera off, packet dropped while the link is
// busy, noise mixing, line spill) is counted and must have happened at least once.
module tb_fpga_time_top;
  import fpga_time_pkg::*;

  logic clk_50mhz = 0, clk_65mhz = 0, reset_in = 1;
  always #10    clk_50mhz = ~clk_50mhz;
  always #7.692 clk_65mhz = ~clk_65mhz;

  // per-unit stimulus
  logic        pclk [2];
  logic [15:0] cam_pixel [2];
  logic        cam_valid [2], cam_done [2];
  logic [7:0]  mic [2];
  logic        btn_init [2], btn_acc [2], btn_deny [2], btn_end [2];
  logic [3:0]  sw_fx [2];
  logic        sw_mute [2], sw_cam_off [2], sw_filter [2];
  // link
  logic [PAYLOAD_BITS-1:0] tx_payload [2], rx_payload [2];
  logic tx_send [2], tx_busy [2], rx_valid [2];
  int   link_frames [2];
  // outputs
  logic [3:0] vr [2], vg [2], vb [2];
  logic hs [2], vs [2], pwm [2];
  logic [7:0] sample [2];
  logic [1:0] state [2];

  int checks = 0, failures = 0;

  camera_model #(.ID(1'b0)) cam_a (.pclk(pclk[0]), .pixel(cam_pixel[0]), .valid(cam_valid[0]), .frame_done(cam_done[0]));
  camera_model #(.ID(1'b1)) cam_b (.pclk(pclk[1]), .pixel(cam_pixel[1]), .valid(cam_valid[1]), .frame_done(cam_done[1]));

  eth_link_model link_ab (.clk(clk_50mhz), .payload_in(tx_payload[0]), .send_in(tx_send[0]), .busy_out(tx_busy[0]),
                          .rx_payload_out(rx_payload[1]), .rx_valid_out(rx_valid[1]), .frames_out(link_frames[0]));
  eth_link_model link_ba (.clk(clk_50mhz), .payload_in(tx_payload[1]), .send_in(tx_send[1]), .busy_out(tx_busy[1]),
                          .rx_payload_out(rx_payload[0]), .rx_valid_out(rx_valid[0]), .frames_out(link_frames[1]));

  fpga_time_top unit_a (
    .clk_50mhz, .clk_65mhz, .reset_in,
    .cam_pclk_in(pclk[0]), .cam_pixel_in(cam_pixel[0]), .cam_pixel_valid_in(cam_valid[0]), .cam_frame_done_in(cam_done[0]),
    .mic_in(mic[0]), .btn_initiate_in(btn_init[0]), .btn_accept_in(btn_acc[0]), .btn_deny_in(btn_deny[0]), .btn_end_in(btn_end[0]),
    .sw_effects_in(sw_fx[0]), .sw_mute_in(sw_mute[0]), .sw_camera_off_in(sw_cam_off[0]), .sw_filter_in(sw_filter[0]),
    .eth_tx_payload_out(tx_payload[0]), .eth_tx_send_out(tx_send[0]), .eth_tx_busy_in(tx_busy[0]),
    .eth_rx_payload_in(rx_payload[0]), .eth_rx_valid_in(rx_valid[0]),
    .vga_r_out(vr[0]), .vga_g_out(vg[0]), .vga_b_out(vb[0]), .vga_hs_out(hs[0]), .vga_vs_out(vs[0]),
    .audio_sample_out(sample[0]), .audio_pwm_out(pwm[0]), .fsm_state_out(state[0]));

  fpga_time_top unit_b (
    .clk_50mhz, .clk_65mhz, .reset_in,
    .cam_pclk_in(pclk[1]), .cam_pixel_in(cam_pixel[1]), .cam_pixel_valid_in(cam_valid[1]), .cam_frame_done_in(cam_done[1]),
    .mic_in(mic[1]), .btn_initiate_in(btn_init[1]), .btn_accept_in(btn_acc[1]), .btn_deny_in(btn_deny[1]), .btn_end_in(btn_end[1]),
    .sw_effects_in(sw_fx[1]), .sw_mute_in(sw_mute[1]), .sw_camera_off_in(sw_cam_off[1]), .sw_filter_in(sw_filter[1]),
    .eth_tx_payload_out(tx_payload[1]), .eth_tx_send_out(tx_send[1]), .eth_tx_busy_in(tx_busy[1]),
    .eth_rx_payload_in(rx_payload[1]), .eth_rx_valid_in(rx_valid[1]),
    .vga_r_out(vr[1]), .vga_g_out(vg[1]), .vga_b_out(vb[1]), .vga_hs_out(hs[1]), .vga_vs_out(vs[1]),
    .audio_sample_out(sample[1]), .audio_pwm_out(pwm[1]), .fsm_state_out(state[1]));

  // ---------------- mechanism counters ----------------
  int n_incoming = 0, n_calling = 0, n_denied = 0, n_accepted = 0, n_ended = 0;
  int n_tone = 0, n_notify = 0, n_lines = 0, n_effects = 0, n_muted = 0, n_cam_off = 0;
  int n_dropped = 0, n_playback = 0, n_noise = 0, n_rx_checked = 0, n_spill = 0;

  logic [1:0] prev_state [2];
  always @(posedge clk_50mhz) if (!reset_in) begin
    for (int u = 0; u < 2; u++) begin
      if (prev_state[u] == 2'(IDLE) && state[u] == 2'(CALLING))       n_calling++;
      if (prev_state[u] == 2'(IDLE) && state[u] == 2'(INCOMING))      n_incoming++;
      if (prev_state[u] == 2'(CALLING) && state[u] == 2'(IDLE))       n_denied++;
      if (prev_state[u] != 2'(CONNECTED) && state[u] == 2'(CONNECTED)) n_accepted++;
      if (prev_state[u] == 2'(CONNECTED) && state[u] == 2'(IDLE))     n_ended++;
      prev_state[u] = state[u];
    end
    if (unit_b.u_trigger.trigger_out && state[1] == 2'(INCOMING) && sample[1] != 0) n_tone++;
    if (unit_b.u_trigger.trigger_out && state[1] == 2'(CONNECTED) && sample[1] != 0) n_playback++;
    if (unit_b.u_trigger.trigger_out && state[1] == 2'(CONNECTED) && unit_b.u_playback.noise_in && unit_b.u_playback.mic_in != 0) n_noise++;
  end
  always @(posedge clk_65mhz) if (!reset_in) begin
    if (unit_b.u_drawer.in_remote && unit_b.u_drawer.pixel == 12'h0F0 && unit_b.u_drawer.fsm_state_in == INCOMING) n_notify++;
    if (unit_b.u_drawer.in_remote && unit_b.u_drawer.fsm_state_in == CONNECTED && unit_b.u_drawer.remote_fx_in[FX_INVERT]
        && unit_b.u_drawer.remote_fx == ~unit_b.u_drawer.remote_pixel_in && unit_b.u_drawer.remote_fx_in[FX_BW] == 1'b0) n_effects++;
    if (unit_b.u_drawer.in_remote && unit_b.u_drawer.fsm_state_in == CONNECTED && unit_b.u_drawer.remote_fx_in == 4'b1111
        && (unit_b.u_drawer.remote_fx == 12'h000 || unit_b.u_drawer.remote_fx == 12'hFFF || unit_b.u_drawer.remote_fx == 12'h0FF)) n_effects++;
    if (unit_b.u_rx_writer.we_out && unit_b.u_rx_writer.index_q == 9'(VIDEO_WIDTH)) n_lines++;
  end

  // ---------------- what B receives ----------------
  logic [VIDEO_BITS-1:0] last_line [int];   // per row, last video payload B received
  logic expect_fx_all = 0, expect_mute = 0, expect_cam_off = 0;
  always @(posedge clk_50mhz) if (!reset_in && unit_b.rx_valid && state[1] == 2'(CONNECTED)) begin
    logic [VIDEO_BITS-1:0] v;
    int row;
    v = unit_b.rx_video;
    row = int'(v[20:11]);
    n_rx_checked++;
    checks++;
    if (v[10:0] != 0 || row >= 240) begin failures++; $display("FAIL B rx tag h=%0d v=%0d", v[10:0], row); end
    else begin
      last_line[row] = v;
      checks++;
      if (expect_cam_off) begin
        if (v[VIDEO_BITS-1:21] != '0) begin failures++; $display("FAIL B got picture with camera off"); end
        else n_cam_off++;
      end else if (!sw_cam_off[0] && v[21 +: 12] !== {1'b0, 2'(row), 9'd0}) begin
        failures++; $display("FAIL B row %0d first pixel %h", row, v[21 +: 12]);
      end else if (!sw_cam_off[0]) begin
        // Line spill: the 50 MHz sampler steps 1 or 2 camera columns per
        // pixel, so the line runs out after about 246 pixels and the payload
        // is completed from the start of the next row.
        int k, px, py, prev_x;
        logic ok;
        ok = 1; k = -1; prev_x = -1;
        for (int i = 0; i < 320; i++) begin
          px = int'(v[21 + 12*i +: 9]);
          py = int'(v[21 + 12*i + 9 +: 2]);
          if (k < 0 && py != (row % 4)) begin k = i; prev_x = -1; end
          if (py != ((k < 0) ? row % 4 : (row + 1) % 4)) ok = 0;
          if (prev_x < 0 ? px > 2 : (px - prev_x < 1 || px - prev_x > 2)) ok = 0;
          if (px > 319) ok = 0;
          prev_x = px;
        end
        checks++;
        if (!ok || k < 230 || k > 260) begin
          failures++; $display("FAIL B row %0d payload layout (next row from pixel %0d)", row, k);
        end else n_spill++;
      end
    end
    if (expect_fx_all) begin
      checks++;
      if (unit_b.rx_effects != 4'b1111) begin failures++; $display("FAIL B effects %b", unit_b.rx_effects); end
    end
    if (expect_mute) begin
      checks++;
      if (unit_b.rx_audio != '0) begin failures++; $display("FAIL B audio not muted"); end
      else n_muted++;
    end
  end

  // ---------------- helpers ----------------
  // which: 0 call, 1 accept, 2 deny, 3 end
  task automatic press(int u, int which);
    @(negedge clk_50mhz);
    case (which) 0: btn_init[u] = 1; 1: btn_acc[u] = 1; 2: btn_deny[u] = 1; default: btn_end[u] = 1; endcase
    repeat (5) @(negedge clk_50mhz);
    btn_init[u] = 0; btn_acc[u] = 0; btn_deny[u] = 0; btn_end[u] = 0;
  endtask

  task automatic wait_state(int u, call_state_t s, int max_us, string what);
    int t = 0;
    while (state[u] != 2'(s) && t < max_us * 50) begin @(posedge clk_50mhz); t++; end
    checks++;
    if (state[u] != 2'(s)) begin failures++; $display("FAIL %s: unit %0d state %0d", what, u, state[u]); end
  endtask

  task automatic finish();
    $display("mechanisms: calling=%0d incoming=%0d denied=%0d accepted=%0d ended=%0d tone=%0d notify=%0d lines=%0d effects=%0d muted=%0d cam_off=%0d dropped=%0d playback=%0d noise=%0d spill=%0d rx=%0d",
             n_calling, n_incoming, n_denied, n_accepted, n_ended, n_tone, n_notify, n_lines, n_effects, n_muted, n_cam_off, n_dropped, n_playback, n_noise, n_spill, n_rx_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #400ms; failures++; $display("FAIL watchdog"); finish();
  end

  // microphones: slow triangle waves (50 MHz domain)
  int mic_phase = 0;
  always @(posedge clk_50mhz) begin
    mic_phase <= (mic_phase + 1) % 50000;
    mic[0] <= 8'((mic_phase < 25000) ? (mic_phase / 400) - 31 : 31 - ((mic_phase - 25000) / 400));
    mic[1] <= 8'((mic_phase % 20000) / 400 - 25);
  end

  initial begin
    for (int u = 0; u < 2; u++) begin
      btn_init[u] = 0; btn_acc[u] = 0; btn_deny[u] = 0; btn_end[u] = 0;
      sw_fx[u] = 0; sw_mute[u] = 0; sw_cam_off[u] = 0; sw_filter[u] = 1;
      prev_state[u] = 2'(IDLE);
    end
    repeat (20) @(negedge clk_50mhz);
    reset_in = 0;
    repeat (20) @(negedge clk_50mhz);

    // 1. call, ring, deny
    press(0, 0);
    wait_state(0, CALLING, 100, "A calling");
    wait_state(1, INCOMING, 20000, "B incoming");
    #1.5ms;       // ring for a while (tone, notification over a display frame)
    press(1, 2);
    wait_state(1, IDLE, 100, "B back to idle");
    wait_state(0, IDLE, 20000, "A denied");

    // 2. call, accept
    #200us;
    press(0, 0);
    wait_state(1, INCOMING, 20000, "B incoming again");
    #100us;
    press(1, 1);
    wait_state(1, CONNECTED, 100, "B connected");
    wait_state(0, CONNECTED, 20000, "A connected");

    // 3. connected with effects
    sw_fx[0] = 4'b0100;       // invert only
    #5ms;
    sw_fx[0] = 4'b1111;       // hat, black-and-white, invert, noise
    #200us;
    expect_fx_all = 1;
    #12ms;
    // B's frame buffer holds the last line received for each row
    #20us;
    foreach (last_line[row]) begin
      for (int i = 0; i < 320; i++) begin
        checks++;
        if (unit_b.u_rx_frame_buffer.mem[row*320 + i] !== last_line[row][21 + 12*i +: 12]) begin
          failures++; if (failures < 20) $display("FAIL B frame buffer row %0d col %0d", row, i);
        end
      end
    end
    checks++;
    if (last_line.num() < 20) begin failures++; $display("FAIL only %0d rows received", last_line.num()); end

    // 4. mute and camera off
    expect_fx_all = 0;
    sw_mute[0] = 1; sw_cam_off[0] = 1;
    #2ms;          // the last unmuted audio payload (1.33 ms) has been replaced
    expect_mute = 1; expect_cam_off = 1;
    #4ms;

    // 5. hang up
    press(1, 3);
    wait_state(1, IDLE, 100, "B hung up");
    wait_state(0, IDLE, 20000, "A sees end");

    repeat (10) @(posedge clk_50mhz);
    n_dropped = int'(unit_a.packets_dropped) + int'(unit_b.packets_dropped);
    checks++; if (n_calling  < 2) begin failures++; $display("FAIL calling never"); end
    checks++; if (n_incoming < 2) begin failures++; $display("FAIL incoming never"); end
    checks++; if (n_denied   < 1) begin failures++; $display("FAIL denied never"); end
    checks++; if (n_accepted < 2) begin failures++; $display("FAIL accepted never"); end
    checks++; if (n_ended    < 2) begin failures++; $display("FAIL ended never"); end
    checks++; if (n_tone     < 1) begin failures++; $display("FAIL tone never"); end
    checks++; if (n_notify   < 1) begin failures++; $display("FAIL notification never"); end
    checks++; if (n_lines    < 1) begin failures++; $display("FAIL line write never"); end
    checks++; if (n_effects  < 1) begin failures++; $display("FAIL effects never"); end
    checks++; if (n_muted    < 1) begin failures++; $display("FAIL mute never"); end
    checks++; if (n_cam_off  < 1) begin failures++; $display("FAIL camera off never"); end
    checks++; if (n_dropped  < 1) begin failures++; $display("FAIL drop never"); end
    checks++; if (n_playback < 1) begin failures++; $display("FAIL playback never"); end
    checks++; if (n_noise    < 1) begin failures++; $display("FAIL noise never"); end
    checks++; if (n_spill    < 1) begin failures++; $display("FAIL line spill never"); end
    finish();
  end
endmodule
