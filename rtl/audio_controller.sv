// audio_controller: builds the 8-byte audio payload from the microphone.
//
// On every 48 kHz audio_sample_trigger_in the signed microphone sample is
// loaded into the input of a 31-tap low-pass FIR (fir31, started on the next
// clock) and the FIR's current output byte y[17:10] is written into payload
// byte packet_index. packet_index advances once every eight triggers, so each
// byte ends up holding every eighth filtered sample: the microphone is
// filtered and decimated from 48 kHz to 6 kHz. When all 8 bytes are filled
// (64 triggers, 1.33 ms) audio_out is loaded with the payload, byte 0 in bits
// [7:0], and valid_audio_out pulses for one clock; with mute_in the loaded
// payload is all zero.
// apply_echo_in is the random-noise effect: the raw microphone input is
// added to itself before filtering (saturated to 8 bits). filter_in low
// bypasses the filter, and the byte written is the unfiltered input.
// The trigger/index/sample-count scheme and the muting follow the described
// design; the FIR coefficients, the bypass and the saturation are this
// design's choices.
module audio_controller
  import fpga_time_pkg::*;
#(
  parameter int unsigned BYTES = AUDIO_BYTES
) (
  input  logic               clk_50mhz,
  input  logic               reset_in,
  input  logic               apply_echo_in,
  input  logic               mute_in,
  input  logic               filter_in,
  input  logic               audio_sample_trigger_in,
  input  logic signed [7:0]  mic_in,
  output logic               valid_audio_out,
  output logic [BYTES*8-1:0] audio_out
);

  logic [BYTES*8-1:0] packet_q;
  logic [3:0]         packet_index_q;
  logic [2:0]         sample_count_q;
  logic signed [7:0]  fir_in_q;
  logic               fir_ready_q;
  logic signed [17:0] fir_out;
  logic signed [8:0]  doubled;
  logic signed [7:0]  next_in;

  fir31 u_fir (.clk(clk_50mhz), .reset_in(reset_in), .ready_in(fir_ready_q), .x_in(fir_in_q), .y_out(fir_out));

  assign doubled = 9'(mic_in) + 9'(mic_in);
  always_comb begin
    if (!apply_echo_in)        next_in = mic_in;
    else if (doubled > 9'sd127)  next_in = 8'sd127;
    else if (doubled < -9'sd128) next_in = -8'sd128;
    else                       next_in = 8'(doubled);
  end

  always_ff @(posedge clk_50mhz) begin
    if (reset_in) begin
      packet_q        <= '0;
      packet_index_q  <= '0;
      sample_count_q  <= '0;
      fir_in_q        <= '0;
      fir_ready_q     <= 1'b0;
      valid_audio_out <= 1'b0;
      audio_out       <= '0;
    end else begin
      valid_audio_out <= 1'b0;
      fir_ready_q     <= 1'b0;
      if (32'(packet_index_q) >= BYTES) begin
        audio_out       <= mute_in ? '0 : packet_q;
        valid_audio_out <= 1'b1;
        packet_index_q  <= '0;
        sample_count_q  <= '0;
      end else if (audio_sample_trigger_in) begin
        fir_in_q    <= next_in;
        fir_ready_q <= 1'b1;
        packet_q[packet_index_q*8 +: 8] <= filter_in ? fir_out[17:10] : fir_in_q;
        if (sample_count_q == 3'd7) packet_index_q <= packet_index_q + 1'b1;
        sample_count_q <= sample_count_q + 1'b1;
      end
    end
  end

endmodule
