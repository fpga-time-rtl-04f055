// tb_camera_controller: writes a full 320x240 camera frame on a 25 MHz camera
// clock, then runs 1024x768 display counters at 65 MHz. Checks:
//   * the self-view pixel_out equals the 12-bit reduction of the camera pixel
//     at (hcount, vcount), one 65 MHz clock after the counters;
//   * every video payload starts at hcount 0 of a picture row, its first pixel
//     is that row's column 0, later pixels come from increasing columns (each
//     pixel encodes its own column), and the tag fields are consistent;
//   * with the camera off the payload pixel field is zero.
module tb_camera_controller;
  import fpga_time_pkg::*;
  logic clk50_mhz = 0, clk65_mhz = 0, pclk_in = 0, reset_in = 1;
  logic [10:0] hcount = 11'd1343;
  logic [9:0]  vcount = 10'd805;
  logic [15:0] cam_pixel_in = '0;
  logic cam_pixel_valid_in = 0, cam_frame_done_in = 0, camera_off_in = 0;
  logic [11:0] pixel_out;
  logic [VIDEO_BITS-1:0] video_out;
  logic valid_video_out;
  int checks = 0, failures = 0, payloads = 0;

  camera_controller dut (.*);

  always #10    clk50_mhz = ~clk50_mhz;
  always #7.692 clk65_mhz = ~clk65_mhz;
  always #20    pclk_in   = ~pclk_in;

  // 12-bit picture: column in [8:0], row bits in [11:9]
  function automatic logic [11:0] pic(int x, int y);
    return {3'(y), 9'(x)};
  endfunction

  initial begin
    #60ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // camera frame
  initial begin
    logic [11:0] p;
    repeat (4) @(posedge clk50_mhz);
    reset_in = 0;
    repeat (10) @(posedge pclk_in);
    @(negedge pclk_in); cam_frame_done_in = 1;
    @(negedge pclk_in); cam_frame_done_in = 0;
    for (int y = 0; y < 240; y++)
      for (int x = 0; x < 320; x++) begin
        @(negedge pclk_in);
        p = pic(x, y);
        cam_pixel_valid_in = 1;
        cam_pixel_in = {p[11:8], 1'($urandom), p[7:4], 2'($urandom), p[3:0], 1'($urandom)};
        if ((x + y) % 7 == 3) begin   // idle camera clocks in between
          @(negedge pclk_in); cam_pixel_valid_in = 0; cam_pixel_in = 16'($urandom);
        end
      end
    @(negedge pclk_in); cam_pixel_valid_in = 0;
  end

  // display counters and self-view check
  logic [10:0] h_d; logic [9:0] v_d; logic run = 0;
  initial begin
    wait (dut.wr_addr_q == 17'(320*240));
    #1us;
    @(negedge clk65_mhz); run = 1;
  end
  always @(posedge clk65_mhz) begin
    if (run) begin
      h_d <= hcount; v_d <= vcount;
      hcount <= (hcount == 1343) ? '0 : hcount + 1'b1;
      if (hcount == 1343) vcount <= (vcount == 805) ? '0 : vcount + 1'b1;
    end
  end
  logic run_d;
  always @(posedge clk65_mhz) run_d <= run;
  always @(negedge clk65_mhz) begin
    if (run && run_d && h_d < 320 && v_d < 240) begin
      checks++;
      if (pixel_out !== pic(h_d, v_d)) begin
        failures++; if (failures < 10) $display("FAIL self view (%0d,%0d) got %h", h_d, v_d, pixel_out);
      end
    end
  end

  // payload checks
  always @(posedge clk50_mhz) begin
    if (valid_video_out) begin
      int v, last_x, x;
      logic [11:0] p;
      payloads++;
      v = int'(video_out[20:11]);
      checks++;
      if (video_out[10:0] != 0 || v >= 240) begin failures++; $display("FAIL tag h=%0d v=%0d", video_out[10:0], v); end
      if (camera_off_in) begin
        checks++;
        if (video_out[VIDEO_BITS-1:21] != '0) begin failures++; $display("FAIL camera off payload not blank"); end
      end else begin
        p = video_out[21 +: 12];
        checks++;
        if (p !== pic(0, v)) begin failures++; $display("FAIL first pixel %h exp %h", p, pic(0, v)); end
        last_x = 0;
        for (int i = 1; i < 320; i++) begin
          p = video_out[21 + 12*i +: 12];
          x = int'(p[8:0]);
          checks++;
          // within a row the column grows by 1 or 2 (50 MHz samples of a 65 MHz
          // counter); a new row starts again at column 0 or 1
          if (!((x > last_x && x <= last_x + 2) || x <= 1)) begin
            failures++; if (failures < 10) $display("FAIL payload pixel %0d column %0d after %0d", i, x, last_x);
          end
          last_x = x;
        end
      end
    end
  end

  initial begin
    wait (run);
    wait (payloads == 4);
    @(negedge clk50_mhz); camera_off_in = 1;
    wait (payloads == 6);
    @(negedge clk50_mhz); camera_off_in = 0;
    wait (payloads == 8);
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
