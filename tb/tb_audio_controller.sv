// tb_audio_controller: drives triggers every 120 clocks with random
// microphone samples and checks each 8-byte payload against a reference:
// byte k holds the filter output seen at trigger 8k+7, i.e. the 31-tap
// convolution of the inputs loaded up to trigger 8k+6, upper 8 bits. Also
// checks the unfiltered path, the noise effect (input doubled, saturated),
// muting and that a payload appears one clock after every 64th trigger.
module tb_audio_controller;
  logic clk_50mhz = 0, reset_in = 1, apply_echo_in = 0, mute_in = 0, filter_in = 1;
  logic audio_sample_trigger_in = 0;
  logic signed [7:0] mic_in = '0;
  logic valid_audio_out;
  logic [63:0] audio_out;
  int checks = 0, failures = 0;
  int taps [31] = '{-1,-1,-3,-5,-6,-7,-5,0,10,26,46,69,91,110,123,128,123,110,91,69,46,26,10,0,-5,-7,-6,-5,-3,-1,-1};
  int xin [$];          // filter inputs in order
  logic [7:0] expected [8];

  audio_controller dut (.*);
  always #10 clk_50mhz = ~clk_50mhz;

  initial begin
    #20ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int sat8(int v);
    return v > 127 ? 127 : (v < -128 ? -128 : v);
  endfunction

  // filter output available at a trigger: convolution of inputs before it
  function automatic logic [7:0] fir_now();
    int acc = 0, n = xin.size();
    for (int i = 0; i < 31; i++) if (n - 1 - i >= 0) acc += taps[i] * xin[n-1-i];
    if (acc > 131071) acc = 131071;
    if (acc < -131072) acc = -131072;
    return 8'(acc >>> 10);
  endfunction

  task automatic run_payload(logic filt, logic echo, logic mute);
    int got_at;
    filter_in = filt; apply_echo_in = echo; mute_in = mute;
    for (int t = 0; t < 64; t++) begin
      int m;
      repeat (119) @(negedge clk_50mhz);
      m = int'($signed(8'($urandom)));
      if (t % 8 == 7) expected[t/8] = filt ? fir_now() : 8'(xin.size() ? xin[xin.size()-1] : 0);
      mic_in = 8'(m);
      audio_sample_trigger_in = 1;
      xin.push_back(echo ? sat8(2*m) : m);
      @(negedge clk_50mhz); audio_sample_trigger_in = 0;
      if (t < 63 || t == 63) begin
        checks++;
        if (valid_audio_out) begin failures++; $display("FAIL early valid t=%0d", t); end
      end
    end
    // payload one clock after the 64th trigger
    @(posedge clk_50mhz); #1;
    checks++;
    if (!valid_audio_out) begin failures++; $display("FAIL no valid after 64 triggers"); end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (audio_out[8*k +: 8] !== (mute ? 8'h00 : expected[k])) begin
        failures++; $display("FAIL byte %0d got %h exp %h (filt %0d echo %0d mute %0d)", k, audio_out[8*k +: 8], expected[k], filt, echo, mute);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk_50mhz);
    reset_in = 0;
    run_payload(1, 0, 0);
    run_payload(1, 0, 0);
    run_payload(0, 0, 0);
    run_payload(0, 1, 0);
    run_payload(1, 1, 0);
    run_payload(1, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
