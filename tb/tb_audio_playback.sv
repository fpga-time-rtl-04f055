// tb_audio_playback: CONNECTED: the output at every eighth trigger is the
// upper byte of the 31-tap convolution of the payload bytes fed so far
// (byte 0 first) and is held for eight triggers; with the noise flag the
// microphone sample is added before filtering. INCOMING: a +/-64 square wave
// changing every 24 triggers. IDLE and CALLING: silence. Also checks the PWM
// duty cycle.
module tb_audio_playback;
  import fpga_time_pkg::*;
  logic clk = 0, reset_in = 1, trigger_in = 0, noise_in = 0, pwm_out;
  call_state_t fsm_state_in = IDLE;
  logic [63:0] audio_payload_in = '0;
  logic signed [7:0] mic_in = '0, sample_out;
  int checks = 0, failures = 0;
  int taps [31] = '{-1,-1,-3,-5,-6,-7,-5,0,10,26,46,69,91,110,123,128,123,110,91,69,46,26,10,0,-5,-7,-6,-5,-3,-1,-1};
  int xin [$];

  audio_playback dut (.*);
  always #10 clk = ~clk;

  initial begin
    #30ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [7:0] fir_now();
    int acc = 0, n = xin.size();
    for (int i = 0; i < 31; i++) if (n - 1 - i >= 0) acc += taps[i] * xin[n-1-i];
    if (acc > 131071) acc = 131071;
    if (acc < -131072) acc = -131072;
    return 8'(acc >>> 10);
  endfunction

  task automatic trig();
    repeat (59) @(negedge clk);
    trigger_in = 1;
    @(negedge clk); trigger_in = 0;
  endtask

  initial begin
    logic [7:0] expv;
    int byte_i, mixed;
    repeat (3) @(negedge clk);
    reset_in = 0;
    // silence while idle / calling
    audio_payload_in = {$urandom, $urandom};
    for (int t = 0; t < 20; t++) begin
      fsm_state_in = (t < 10) ? IDLE : CALLING;
      trig(); checks++;
      if (sample_out !== 8'sd0) begin failures++; $display("FAIL not silent"); end
    end
    // incoming: tone
    fsm_state_in = INCOMING;
    begin
      int flips = 0; logic signed [7:0] last;
      trig(); last = sample_out;
      for (int t = 1; t < 200; t++) begin
        trig(); checks++;
        if (sample_out !== 8'sd64 && sample_out !== -8'sd64) begin failures++; $display("FAIL tone level %0d", sample_out); end
        if (sample_out != last) begin
          flips++; checks++;
          if (t % 24 != 0) begin failures++; $display("FAIL tone flip at %0d", t); end
        end
        last = sample_out;
      end
      checks++;
      if (flips < 7) begin failures++; $display("FAIL too few tone flips %0d", flips); end
    end
    // connected: filtered, held playback
    fsm_state_in = IDLE; trig();
    fsm_state_in = CONNECTED;
    byte_i = 0;
    for (int t = 0; t < 8 * 70; t++) begin
      if (t == 8 * 40) noise_in = 1;
      if (t % 64 == 0) audio_payload_in = {$urandom, $urandom};
      mic_in = 8'($urandom_range(0, 40)) - 8'sd20;
      if (t % 8 == 0) begin
        expv = fir_now();
        mixed = int'($signed(audio_payload_in[8*byte_i +: 8])) + (noise_in ? int'(mic_in) : 0);
        xin.push_back(mixed > 127 ? 127 : (mixed < -128 ? -128 : mixed));
        byte_i = (byte_i + 1) % 8;
      end
      trig(); checks++;
      if (sample_out !== expv) begin failures++; if (failures < 10) $display("FAIL playback t=%0d got %h exp %h", t, sample_out, expv); end
    end
    // PWM duty equals sample + 128 out of 256
    begin
      int ones = 0;
      fsm_state_in = INCOMING;
      trig();
      repeat (4) @(negedge clk);
      for (int i = 0; i < 256; i++) begin @(negedge clk); ones += pwm_out; end
      checks++;
      if (ones != int'(sample_out) + 128) begin failures++; $display("FAIL pwm ones %0d sample %0d", ones, sample_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
