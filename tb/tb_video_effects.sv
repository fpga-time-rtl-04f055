// tb_video_effects: random pixels, positions and effect words against an
// independent model: threshold R+G+B >= 24 for black-and-white, the hat
// picture (pompom radius 3 at (16,3), brim rows 24..29 cols 2..29, red cone of
// half width 2+(row-6)/2 over rows 6..23) at (144,8) with black transparent,
// and bitwise inversion last.
module tb_video_effects;
  logic [11:0] pixel_in = '0, pixel_out;
  logic [8:0] x_in = '0;
  logic [7:0] y_in = '0;
  logic [3:0] effects_in = '0;
  int checks = 0, failures = 0;
  int hat_hits = 0, bw_hits = 0;

  video_effects dut (.*);

  function automatic logic [11:0] model(logic [11:0] p, int x, int y, logic [3:0] fx);
    logic [11:0] r = p, h = 0;
    int hx = x - 144, hy = y - 8;
    if (fx[1]) r = (p[11:8] + p[7:4] + p[3:0] >= 24) ? 12'hFFF : 12'h000;
    if (hx >= 0 && hx < 32 && hy >= 0 && hy < 32) begin
      if ((hx-16)*(hx-16) + (hy-3)*(hy-3) <= 9) h = 12'hFFF;
      else if (hy >= 24 && hy <= 29 && hx >= 2 && hx <= 29) h = 12'hFFF;
      else if (hy >= 6 && hy <= 23 && (hx-16) >= -(2 + (hy-6)/2) && (hx-16) <= 2 + (hy-6)/2) h = 12'hF00;
    end
    if (fx[0] && h != 0) r = h;
    if (fx[2]) r = ~r;
    return r;
  endfunction

  initial begin
    #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      pixel_in = 12'($urandom);
      if (i % 2 == 0) begin x_in = 9'($urandom_range(140, 180)); y_in = 8'($urandom_range(4, 44)); end
      else begin x_in = 9'($urandom_range(0, 319)); y_in = 8'($urandom_range(0, 239)); end
      effects_in = 4'($urandom);
      #1;
      checks++;
      if (pixel_out !== model(pixel_in, x_in, y_in, effects_in)) begin
        failures++;
        if (failures < 10) $display("FAIL p=%h x=%0d y=%0d fx=%b got %h exp %h", pixel_in, x_in, y_in, effects_in, pixel_out, model(pixel_in, x_in, y_in, effects_in));
      end
      if (effects_in[0] && model(pixel_in, x_in, y_in, 4'b0001) != pixel_in) hat_hits++;
    end
    // exact threshold cases: sum 23 -> black, sum 24 -> white
    effects_in = 4'b0010; x_in = 0; y_in = 0;
    pixel_in = 12'h878; #1; checks++; if (pixel_out !== 12'h000) failures++;
    pixel_in = 12'h888; #1; checks++; if (pixel_out !== 12'hFFF) failures++;
    effects_in = 4'b0110; #1; checks++; if (pixel_out !== 12'h000) failures++;
    checks++;
    if (hat_hits < 100) begin failures++; $display("FAIL hat rarely drawn %0d", hat_hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
