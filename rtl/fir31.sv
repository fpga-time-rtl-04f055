// fir31: 31-tap low-pass FIR filter for 8-bit audio.
//
// On each ready_in strobe the signed 8-bit x_in is shifted into a 31-entry
// sample line. The filter then performs one multiply-accumulate per clock
// (31 clocks) with the coefficients of fpga_time_pkg::FIR_COEFF and, on the
// 32nd clock after the strobe, loads the saturated 18-bit sum into y_out,
// which holds until the next result. The coefficients sum to about 1024, so
// y_out[17:10] is the filtered sample at unity gain. Strobes must be at least
// 32 clocks apart (the design uses one every ~1042 clocks).
// The described design gives the tap count and the use of y_out[17:10]; the
// coefficients and the serial multiply-accumulate are this design's choices.
module fir31
  import fpga_time_pkg::*;
(
  input  logic               clk,
  input  logic               reset_in,
  input  logic               ready_in,
  input  logic signed [7:0]  x_in,
  output logic signed [17:0] y_out
);

  logic signed [7:0]  sample_q [FIR_TAPS];
  logic [4:0]         tap_q;
  logic               busy_q;
  logic signed [21:0] acc_q;
  logic signed [21:0] product;

  assign product = 22'(sample_q[tap_q] * FIR_COEFF[tap_q]);

  always_ff @(posedge clk) begin
    if (reset_in) begin
      for (int i = 0; i < FIR_TAPS; i++) sample_q[i] <= '0;
      tap_q  <= '0;
      busy_q <= 1'b0;
      acc_q  <= '0;
      y_out  <= '0;
    end else if (ready_in) begin
      sample_q[0] <= x_in;
      for (int i = 1; i < FIR_TAPS; i++) sample_q[i] <= sample_q[i-1];
      tap_q  <= '0;
      busy_q <= 1'b1;
      acc_q  <= '0;
    end else if (busy_q) begin
      if (32'(tap_q) == FIR_TAPS - 1) begin
        busy_q <= 1'b0;
        if (acc_q + product > 22'sd131071)       y_out <= 18'sd131071;
        else if (acc_q + product < -22'sd131072) y_out <= -18'sd131072;
        else                                     y_out <= 18'(acc_q + product);
      end else begin
        acc_q <= acc_q + product;
        tap_q <= tap_q + 1'b1;
      end
    end
  end

endmodule
