// audio_sample_trigger: one-clock audio sample strobe.
//
// Counts clk cycles and pulses trigger_out once every CLK_HZ/SAMPLE_HZ
// cycles (1041 cycles at 50 MHz, 48.03 kHz). The described design uses a
// 48 kHz audio_sample_trigger_in; how it is made is this design's choice.
module audio_sample_trigger #(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned SAMPLE_HZ = 48_000,
  localparam int unsigned DIVIDE   = CLK_HZ / SAMPLE_HZ
) (
  input  logic clk,
  input  logic reset_in,
  output logic trigger_out
);

  logic [$clog2(DIVIDE)-1:0] count_q;

  always_ff @(posedge clk) begin
    if (reset_in) begin
      count_q     <= '0;
      trigger_out <= 1'b0;
    end else if (32'(count_q) == DIVIDE - 1) begin
      count_q     <= '0;
      trigger_out <= 1'b1;
    end else begin
      count_q     <= count_q + 1'b1;
      trigger_out <= 1'b0;
    end
  end

endmodule
