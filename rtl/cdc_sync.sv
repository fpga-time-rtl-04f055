// cdc_sync: two-register synchroniser.
//
// Each bit of d_in passes through two flip-flops clocked by the destination
// clock, so q_out follows d_in two clk edges later. As in the described
// design it carries slowly changing level signals (the effects header, the
// call state, reset) from the 50 MHz domain into the faster 65 MHz domain; a
// multi-bit value is only safe because it stays stable for many cycles.
module cdc_sync #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d_in,
  output logic [WIDTH-1:0] q_out
);

  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk) begin
    meta  <= d_in;
    q_out <= meta;
  end

endmodule
