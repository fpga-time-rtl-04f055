// ethernet_controller: assembles and parses the 492-byte call payload.
//
// Payload layout (bit 0 = first bit of the 3936-bit vector):
//   [3863:0]    483-byte video payload
//   [3927:3864] 8-byte audio payload
//   [3931:3928] 4-bit action header
//   [3935:3932] 4-bit one-hot effects header
// Send side: the latest complete audio payload is kept. When a video
// payload arrives (valid_video_in) and the UDP send module is not busy, the
// full payload is registered onto payload_out and send_out pulses for one
// clock; a video payload that arrives while busy_in is high is dropped
// (counted in dropped_out). sent_out equals send_out, for the action encoder.
// Receive side: on valid_data_in the received payload is split into
// rx_video_out, rx_audio_out, rx_action_out and rx_effects_out, which hold
// until the next packet, and rx_valid_out pulses for one clock.
// The sizes and contents of the payload follow the described design; the bit
// order of the fields and the drop-when-busy rule are this design's choices.
// The UDP send/receive modules themselves sit outside this block.
module ethernet_controller
  import fpga_time_pkg::*;
(
  input  logic                    clk_50mhz,
  input  logic                    reset_in,
  input  logic [VIDEO_BITS-1:0]   video_in,
  input  logic                    valid_video_in,
  input  logic [AUDIO_BITS-1:0]   audio_in,
  input  logic                    valid_audio_in,
  input  logic [3:0]              action_in,
  input  logic [3:0]              effects_in,
  input  logic                    busy_in,
  output logic [PAYLOAD_BITS-1:0] payload_out,
  output logic                    send_out,
  output logic                    sent_out,
  output logic [15:0]             dropped_out,
  input  logic [PAYLOAD_BITS-1:0] payload_in,
  input  logic                    valid_data_in,
  output logic [VIDEO_BITS-1:0]   rx_video_out,
  output logic [AUDIO_BITS-1:0]   rx_audio_out,
  output logic [3:0]              rx_action_out,
  output logic [3:0]              rx_effects_out,
  output logic                    rx_valid_out
);

  logic [AUDIO_BITS-1:0] audio_q;

  assign sent_out = send_out;

  always_ff @(posedge clk_50mhz) begin
    if (reset_in) begin
      audio_q     <= '0;
      payload_out <= '0;
      send_out    <= 1'b0;
      dropped_out <= '0;
    end else begin
      send_out <= 1'b0;
      if (valid_audio_in) audio_q <= audio_in;
      if (valid_video_in) begin
        if (!busy_in && !send_out) begin
          payload_out <= {effects_in, action_in, valid_audio_in ? audio_in : audio_q, video_in};
          send_out    <= 1'b1;
        end else begin
          dropped_out <= dropped_out + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk_50mhz) begin
    if (reset_in) begin
      rx_video_out   <= '0;
      rx_audio_out   <= '0;
      rx_action_out  <= IDLE_ACT;
      rx_effects_out <= '0;
      rx_valid_out   <= 1'b0;
    end else begin
      rx_valid_out <= valid_data_in;
      if (valid_data_in) begin
        rx_video_out   <= payload_in[PL_VIDEO_LSB +: VIDEO_BITS];
        rx_audio_out   <= payload_in[PL_AUDIO_LSB +: AUDIO_BITS];
        rx_action_out  <= payload_in[PL_ACTION_LSB +: 4];
        rx_effects_out <= payload_in[PL_EFFECTS_LSB +: 4];
      end
    end
  end

endmodule
