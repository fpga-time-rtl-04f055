// eth_link_model: behavioural stand-in for one direction of the UDP link
// (send module, cable, receive module). When send_in is seen it raises
// busy_out for BUSY_CYCLES clocks (the time a 492-byte payload plus
// Ethernet/IP/UDP overhead takes at 100 Mb/s: about 546 bytes * 4 clocks of
// 50 MHz), then presents the payload on rx_payload_out with a one-clock
// rx_valid_out. Not synthesizable; for testbenches only.
module eth_link_model #(
  parameter int BUSY_CYCLES = 2184,
  parameter int BITS        = 3936
) (
  input  logic            clk,
  input  logic [BITS-1:0] payload_in,
  input  logic            send_in,
  output logic            busy_out,
  output logic [BITS-1:0] rx_payload_out,
  output logic            rx_valid_out,
  output int              frames_out
);
  int count = 0;
  logic [BITS-1:0] buffer;
  initial begin busy_out = 0; rx_valid_out = 0; rx_payload_out = '0; frames_out = 0; end
  always @(posedge clk) begin
    rx_valid_out <= 1'b0;
    if (send_in && !busy_out) begin
      buffer   <= payload_in;
      busy_out <= 1'b1;
      count    <= BUSY_CYCLES;
    end else if (busy_out) begin
      if (count == 1) begin
        busy_out       <= 1'b0;
        rx_payload_out <= buffer;
        rx_valid_out   <= 1'b1;
        frames_out     <= frames_out + 1;
      end
      count <= count - 1;
    end
  end
endmodule
