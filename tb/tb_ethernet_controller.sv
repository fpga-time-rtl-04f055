// tb_ethernet_controller: checks the payload layout {effects, action, audio,
// video}, that the latest audio payload is used, that a video payload is
// dropped (and counted) while the sender is busy, and the receive split.
module tb_ethernet_controller;
  import fpga_time_pkg::*;
  logic clk_50mhz = 0, reset_in = 1;
  logic [VIDEO_BITS-1:0] video_in = '0;
  logic valid_video_in = 0, valid_audio_in = 0, busy_in = 0, valid_data_in = 0;
  logic [AUDIO_BITS-1:0] audio_in = '0;
  logic [3:0] action_in = '0, effects_in = '0;
  logic [PAYLOAD_BITS-1:0] payload_out, payload_in = '0;
  logic send_out, sent_out;
  logic [15:0] dropped_out;
  logic [VIDEO_BITS-1:0] rx_video_out;
  logic [AUDIO_BITS-1:0] rx_audio_out;
  logic [3:0] rx_action_out, rx_effects_out;
  logic rx_valid_out;
  int checks = 0, failures = 0;

  ethernet_controller dut (.*);
  always #10 clk_50mhz = ~clk_50mhz;

  initial begin
    #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [VIDEO_BITS-1:0] rand_video();
    logic [VIDEO_BITS-1:0] v;
    for (int i = 0; i < VIDEO_BITS; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [VIDEO_BITS-1:0] v;
    logic [AUDIO_BITS-1:0] a;
    repeat (3) @(negedge clk_50mhz);
    reset_in = 0;
    for (int n = 0; n < 20; n++) begin
      // a new audio payload
      a = {$urandom, $urandom};
      @(negedge clk_50mhz); audio_in = a; valid_audio_in = 1;
      @(negedge clk_50mhz); valid_audio_in = 0; audio_in = '0;
      repeat (3) @(negedge clk_50mhz);
      // a video payload
      v = rand_video();
      action_in = 4'($urandom_range(0, 5)); effects_in = 4'($urandom);
      busy_in = (n % 4 == 3);
      video_in = v; valid_video_in = 1;
      @(negedge clk_50mhz); valid_video_in = 0;
      if (n % 4 == 3) begin
        chk(!send_out, "send while busy");
        chk(dropped_out == 16'(n / 4 + 1), "drop count");
      end else begin
        chk(send_out, "no send strobe");
        chk(sent_out == send_out, "sent_out");
        chk(payload_out[3863:0] == v, "video field");
        chk(payload_out[3927:3864] == a, "audio field");
        chk(payload_out[3931:3928] == action_in, "action field");
        chk(payload_out[3935:3932] == effects_in, "effects field");
      end
      @(negedge clk_50mhz);
      chk(!send_out, "send longer than one clock");
      busy_in = 0;
      // receive
      for (int i = 0; i < PAYLOAD_BITS; i += 32) payload_in[i +: 32] = $urandom;
      valid_data_in = 1;
      @(negedge clk_50mhz); valid_data_in = 0;
      chk(rx_valid_out, "rx valid");
      chk(rx_video_out == payload_in[3863:0], "rx video");
      chk(rx_audio_out == payload_in[3927:3864], "rx audio");
      chk(rx_action_out == payload_in[3931:3928], "rx action");
      chk(rx_effects_out == payload_in[3935:3932], "rx effects");
      payload_in = '0;
      @(negedge clk_50mhz);
      chk(!rx_valid_out && rx_action_out != 4'hx, "rx valid pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
