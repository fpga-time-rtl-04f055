// video_effects: per-pixel Santa hat, black-and-white and inverted colours.
//
// Combinational. effects_in is the one-hot effects word (bit 0 hat, bit 1
// black-and-white, bit 2 invert; bit 3, audio noise, is ignored here). The
// effects are applied in this order, so they combine:
//   black-and-white: R+G+B of the 4-bit fields; a sum of 24 or more gives
//     white (12'hFFF), less gives black.
//   hat: inside the 32x32 square at (HAT_X, HAT_Y) of the video picture the
//     hat image pixel replaces the video pixel, except where the hat pixel is
//     black (12'h000), which counts as transparent background.
//   invert: every bit of the pixel is negated.
// x_in/y_in are the column and row inside the 320x240 video picture.
// The threshold, the black-is-transparent rule, the 32x32 size and the
// combinability follow the described design. The hat picture is computed
// here instead of read from an image file: a red cone (12'hF00) whose half
// width grows from 2 to 10 pixels over rows 6..23, a white brim (rows 24..29,
// columns 2..29) and a white pompom of radius 3 centred at (16, 3); black
// elsewhere. Its position and the order of the effects are this design's.
module video_effects
  import fpga_time_pkg::*;
#(
  parameter int unsigned HAT_X = 144,
  parameter int unsigned HAT_Y = 8
) (
  input  logic [PIXEL_BITS-1:0] pixel_in,
  input  logic [8:0]            x_in,
  input  logic [7:0]            y_in,
  input  logic [3:0]            effects_in,
  output logic [PIXEL_BITS-1:0] pixel_out
);

  function automatic logic [PIXEL_BITS-1:0] hat_pixel(input logic [4:0] hx, input logic [4:0] hy);
    int dx, dy, half;
    dx = int'(hx) - 16;
    dy = int'(hy) - 3;
    if (dx * dx + dy * dy <= 9)                           return 12'hFFF;
    if (hy >= 5'd24 && hy <= 5'd29 && hx >= 5'd2 && hx <= 5'd29) return 12'hFFF;
    if (hy >= 5'd6 && hy <= 5'd23) begin
      half = 2 + (int'(hy) - 6) / 2;
      if (dx >= -half && dx <= half)                      return 12'hF00;
    end
    return 12'h000;
  endfunction

  logic [5:0]            rgb_sum;
  logic                  in_hat;
  logic [PIXEL_BITS-1:0] hat_px;
  logic [PIXEL_BITS-1:0] p;

  assign rgb_sum = 6'(pixel_in[11:8]) + 6'(pixel_in[7:4]) + 6'(pixel_in[3:0]);
  assign in_hat  = (32'(x_in) >= HAT_X) && (32'(x_in) < HAT_X + 32) &&
                   (32'(y_in) >= HAT_Y) && (32'(y_in) < HAT_Y + 32);
  assign hat_px  = hat_pixel(5'(32'(x_in) - HAT_X), 5'(32'(y_in) - HAT_Y));

  always_comb begin
    p = pixel_in;
    if (effects_in[FX_BW])                            p = (rgb_sum >= 6'd24) ? 12'hFFF : 12'h000;
    if (effects_in[FX_HAT] && in_hat && hat_px != '0) p = hat_px;
    if (effects_in[FX_INVERT])                        p = ~p;
    pixel_out = p;
  end

endmodule
