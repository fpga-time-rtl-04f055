// tb_pixel_drawer: drives 1024x768 counters and models both frame buffers
// (one-clock read latency; the received one addressed by rx_fb_addr_out).
// Checks, two clocks after the counters: self view with local effects in the
// left 320x240, received view with the received effects in the next 320
// columns when CONNECTED, the notification colour when INCOMING, black in
// IDLE/CALLING and everywhere else, and the delayed sync signals.
module tb_pixel_drawer;
  import fpga_time_pkg::*;
  logic clk = 0, reset_in = 1;
  logic [10:0] hcount_in = '0;
  logic [9:0] vcount_in = '0;
  logic hsync_in = 1, vsync_in = 1, blank_in = 0;
  logic [11:0] self_pixel_in = '0, remote_pixel_in = '0;
  call_state_t fsm_state_in = IDLE;
  logic [3:0] local_fx_in = '0, remote_fx_in = '0;
  logic [16:0] rx_fb_addr_out;
  logic [11:0] rgb_out;
  logic hsync_out, vsync_out;
  int checks = 0, failures = 0, remote_seen = 0, notify_seen = 0, warm = 0;
  always @(posedge clk) if (!reset_in) warm <= warm + 1;

  pixel_drawer dut (.*);
  always #7.692 clk = ~clk;

  function automatic logic [11:0] self_img(int x, int y);  return 12'(x * 3 + y * 41); endfunction
  function automatic logic [11:0] rem_img(int a);          return 12'(a * 7 + 5); endfunction
  function automatic logic [11:0] invert(logic [11:0] p, logic [3:0] fx); return fx[2] ? ~p : p; endfunction

  initial begin
    #120ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // counters and frame-buffer models
  int h_q [3], v_q [3]; logic hs_q [3], vs_q [3];
  always @(posedge clk) begin
    self_pixel_in   <= (hcount_in < 320 && vcount_in < 240) ? self_img(hcount_in, vcount_in) : self_img(0, 0);
    remote_pixel_in <= rem_img(int'(rx_fb_addr_out));
    h_q[2] <= h_q[1]; h_q[1] <= h_q[0]; h_q[0] <= int'(hcount_in);
    v_q[2] <= v_q[1]; v_q[1] <= v_q[0]; v_q[0] <= int'(vcount_in);
    hs_q[1] <= hs_q[0]; hs_q[0] <= hsync_in;
    vs_q[1] <= vs_q[0]; vs_q[0] <= vsync_in;
    hcount_in <= (hcount_in == 1343) ? '0 : hcount_in + 1'b1;
    if (hcount_in == 1343) vcount_in <= (vcount_in == 805) ? '0 : vcount_in + 1'b1;
    hsync_in <= $urandom_range(0, 1);
    vsync_in <= $urandom_range(0, 1);
    blank_in <= 0;
  end

  always @(negedge clk) if (!reset_in && warm > 4) begin
    int h, v; logic [11:0] expv;
    h = h_q[1]; v = v_q[1];
    // only the invert effect is used here, so the model stays independent of
    // the hat and black-and-white details (tested on their own)
    if (h < 320 && v < 240) expv = invert(self_img(h, v), local_fx_in);
    else if (h >= 320 && h < 640 && v < 240) begin
      if (fsm_state_in == CONNECTED) begin expv = invert(rem_img(v * 320 + h - 320), remote_fx_in); remote_seen++; end
      else if (fsm_state_in == INCOMING) begin expv = 12'h0F0; notify_seen++; end
      else expv = 12'h000;
    end else expv = 12'h000;
    if (h >= 1024 || v >= 768) expv = 12'h000;
    checks++;
    if (rgb_out !== expv) begin failures++; if (failures < 10) $display("FAIL (%0d,%0d) got %h exp %h state %s", h, v, rgb_out, expv, fsm_state_in.name()); end
    checks++;
    if (hsync_out !== hs_q[1] || vsync_out !== vs_q[1]) begin failures++; if (failures < 10) $display("FAIL sync delay"); end
  end

  initial begin
    repeat (4) @(negedge clk);
    reset_in = 0;
    for (int s = 0; s < 5; s++) begin
      // change settings in the horizontal blanking interval
      while (hcount_in != 11'd1100) @(negedge clk);
      case (s)
        0: begin fsm_state_in = IDLE;      local_fx_in = 4'b0000; remote_fx_in = 4'b0000; end
        1: begin fsm_state_in = INCOMING;  local_fx_in = 4'b0100; end
        2: begin fsm_state_in = CONNECTED; local_fx_in = 4'b0000; remote_fx_in = 4'b0100; end
        3: begin fsm_state_in = CONNECTED; local_fx_in = 4'b1100; remote_fx_in = 4'b0000; end
        default: begin fsm_state_in = CALLING; end
      endcase
      // one whole frame per case
      repeat (1344 * 806) @(negedge clk);
    end
    checks++;
    if (remote_seen == 0 || notify_seen == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
