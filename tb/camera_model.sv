// camera_model: behavioural stand-in for the camera and its pixel-assembly
// logic. On its own 25 MHz clock it delivers 320x240 frames of 16-bit RGB565
// pixels (one pixel per clock, with a gap clock now and then) and a
// one-clock end-of-frame strobe before each frame; the first frame starts
// 2 us after time 0. The 12-bit RGB444 content of
// pixel (x, y) is {ID, y[1:0], x[8:0]} with ID the camera number, so a
// receiver can tell which column, row and camera a pixel came from.
module camera_model #(
  parameter logic ID = 1'b0
) (
  output logic        pclk,
  output logic [15:0] pixel,
  output logic        valid,
  output logic        frame_done
);
  function automatic logic [11:0] pic(int x, int y);
    return {ID, 2'(y), 9'(x)};
  endfunction
  initial begin
    logic [11:0] p;
    pclk = 0; pixel = '0; valid = 0; frame_done = 0;
    fork
      forever #20 pclk = ~pclk;
    join_none
    #2us;          // the camera starts after the FPGA has left reset
    forever begin
      @(negedge pclk); frame_done = 1; valid = 0;
      @(negedge pclk); frame_done = 0;
      for (int y = 0; y < 240; y++)
        for (int x = 0; x < 320; x++) begin
          @(negedge pclk);
          p = pic(x, y);
          valid = 1;
          pixel = {p[11:8], 1'b0, p[7:4], 2'b00, p[3:0], 1'b0};
          if ((x + y) % 11 == 5) begin @(negedge pclk); valid = 0; end
        end
      @(negedge pclk); valid = 0;
      repeat (2000) @(negedge pclk);
    end
  end
endmodule
