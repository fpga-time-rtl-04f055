// xvga: 1024x768 at 60 Hz VGA timing for a 65 MHz pixel clock.
//
// hcount runs 0..1343 and vcount 0..805. Active video is hcount < 1024 and
// vcount < 768; hsync is low for hcount 1048..1183, vsync low for vcount
// 771..776 (front porch 24/3, sync 136/6, back porch 160/29). All outputs are
// registered and change together on the rising clock edge. The described
// design names the XVGA module and its 65 MHz clock but not its timing; the
// standard XGA timing used here is this design's choice.
module xvga
  import fpga_time_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned H_FP     = 24,
  parameter int unsigned H_SYNC   = 136,
  parameter int unsigned H_BP     = 160,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned V_FP     = 3,
  parameter int unsigned V_SYNC   = 6,
  parameter int unsigned V_BP     = 29
) (
  input  logic                   clk,
  input  logic                   reset_in,
  output logic [HCOUNT_BITS-1:0] hcount,
  output logic [VCOUNT_BITS-1:0] vcount,
  output logic                   hsync,
  output logic                   vsync,
  output logic                   blank
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [HCOUNT_BITS-1:0] h_next;
  logic [VCOUNT_BITS-1:0] v_next;

  always_comb begin
    h_next = hcount + 1'b1;
    v_next = vcount;
    if (32'(hcount) == H_TOTAL - 1) begin
      h_next = '0;
      v_next = (32'(vcount) == V_TOTAL - 1) ? '0 : vcount + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (reset_in) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= h_next;
      vcount <= v_next;
      hsync  <= !((32'(h_next) >= H_ACTIVE + H_FP) && (32'(h_next) < H_ACTIVE + H_FP + H_SYNC));
      vsync  <= !((32'(v_next) >= V_ACTIVE + V_FP) && (32'(v_next) < V_ACTIVE + V_FP + V_SYNC));
      blank  <= (32'(h_next) >= H_ACTIVE) || (32'(v_next) >= V_ACTIVE);
    end
  end

endmodule
