// audio_playback: turns the received audio payload into speaker output.
//
// Works on the 48 kHz trigger_in, by call state:
//   CONNECTED: every eighth trigger the next byte of the received 8-byte
//     payload (byte 0, bits [7:0], first; then up to byte 7 and round again)
//     is fed to a 31-tap low-pass FIR, and the FIR output byte y[17:10] of
//     the previous byte is put on sample_out, where it is held for eight
//     triggers: 6 kHz samples upsampled to 48 kHz by holding. With noise_in
//     (the sender's random-noise effect) the local microphone sample is
//     added to the received byte before filtering, saturated to 8 bits.
//   INCOMING: an alternating tone, sample_out switching between +TONE_AMP
//     and -TONE_AMP every TONE_HALF_PERIOD triggers (1 kHz by default).
//   other states: silence (0).
// sample_out is signed. pwm_out is an 8-bit pulse-width modulation of
// sample_out+128 at 50 MHz/256 for a low-pass filtered audio jack.
// The byte order, the FIR, the 8x hold and the per-state behaviour follow the
// described design; the tone's shape, pitch and level and the PWM output are
// this design's choices.
module audio_playback
  import fpga_time_pkg::*;
#(
  parameter int unsigned BYTES            = AUDIO_BYTES,
  parameter int unsigned TONE_HALF_PERIOD = 24,
  parameter logic signed [7:0] TONE_AMP   = 8'sd64
) (
  input  logic               clk,
  input  logic               reset_in,
  input  logic               trigger_in,
  input  call_state_t        fsm_state_in,
  input  logic [BYTES*8-1:0] audio_payload_in,
  input  logic               noise_in,
  input  logic signed [7:0]  mic_in,
  output logic signed [7:0]  sample_out,
  output logic               pwm_out
);

  logic [$clog2(BYTES)-1:0] byte_index_q;
  logic [2:0]               hold_q;
  logic [7:0]               tone_count_q;
  logic                     tone_high_q;
  logic signed [7:0]        fir_in_q;
  logic                     fir_ready_q;
  logic signed [17:0]       fir_out;
  logic signed [7:0]        rx_byte;
  logic signed [8:0]        mixed;
  logic signed [7:0]        mixed_sat;
  logic [7:0]               pwm_count_q;

  fir31 u_fir (.clk(clk), .reset_in(reset_in), .ready_in(fir_ready_q), .x_in(fir_in_q), .y_out(fir_out));

  assign rx_byte = audio_payload_in[byte_index_q*8 +: 8];
  assign mixed   = 9'(rx_byte) + (noise_in ? 9'(mic_in) : 9'sd0);
  always_comb begin
    if (mixed > 9'sd127)       mixed_sat = 8'sd127;
    else if (mixed < -9'sd128) mixed_sat = -8'sd128;
    else                       mixed_sat = 8'(mixed);
  end

  always_ff @(posedge clk) begin
    if (reset_in) begin
      byte_index_q <= '0;
      hold_q       <= '0;
      tone_count_q <= '0;
      tone_high_q  <= 1'b0;
      fir_in_q     <= '0;
      fir_ready_q  <= 1'b0;
      sample_out   <= '0;
    end else begin
      fir_ready_q <= 1'b0;
      if (trigger_in) begin
        unique case (fsm_state_in)
          CONNECTED: begin
            if (hold_q == 3'd0) begin
              fir_in_q     <= mixed_sat;
              fir_ready_q  <= 1'b1;
              sample_out   <= fir_out[17:10];
              byte_index_q <= byte_index_q + 1'b1;
            end
            hold_q <= hold_q + 1'b1;
          end
          INCOMING: begin
            if (32'(tone_count_q) == TONE_HALF_PERIOD - 1) begin
              tone_count_q <= '0;
              tone_high_q  <= !tone_high_q;
            end else begin
              tone_count_q <= tone_count_q + 1'b1;
            end
            sample_out <= tone_high_q ? TONE_AMP : -TONE_AMP;
          end
          default: begin
            sample_out <= '0;
            hold_q     <= '0;
          end
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (reset_in) begin
      pwm_count_q <= '0;
      pwm_out     <= 1'b0;
    end else begin
      pwm_count_q <= pwm_count_q + 1'b1;
      pwm_out     <= pwm_count_q < (sample_out ^ 8'h80);
    end
  end

endmodule
