// tb_video_payload_builder: feeds ideal counters (one hcount step per clock)
// and checks that a payload starts at hcount 0, holds the 320 pixels of that
// line in order with the right start counts, appears at the first in-area
// clock after it is full, and has a zero pixel field when the camera is off.
module tb_video_payload_builder;
  import fpga_time_pkg::*;
  logic clk = 0, reset_in = 1, camera_off_in = 0;
  logic [11:0] pixel_in = '0;
  logic [10:0] hcount_in = '0;
  logic [9:0]  vcount_in = '0;
  logic [VIDEO_BITS-1:0] video_out;
  logic valid_video_out;
  int checks = 0, failures = 0;
  int valid_count = 0;

  video_payload_builder dut (.*);
  always #10 clk = ~clk;

  function automatic logic [11:0] pix(int h, int v);
    return 12'((v * 37 + h * 5) ^ (h << 3));
  endfunction

  initial begin
    #20ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // drive one clock with given counters
  task automatic step(int h, int v);
    @(negedge clk);
    hcount_in = 11'(h); vcount_in = 10'(v); pixel_in = pix(h, v);
  endtask

  task automatic check_payload(int v, logic off);
    checks++;
    if (video_out[10:0] !== 11'd0) begin failures++; $display("FAIL start hcount %0d", video_out[10:0]); end
    checks++;
    if (video_out[20:11] !== 10'(v)) begin failures++; $display("FAIL start vcount %0d exp %0d", video_out[20:11], v); end
    for (int i = 0; i < 320; i++) begin
      checks++;
      if (video_out[21 + 12*i +: 12] !== (off ? 12'h0 : pix(i, v))) begin
        failures++; if (failures < 10) $display("FAIL pixel %0d got %h exp %h", i, video_out[21+12*i +: 12], pix(i, v));
      end
    end
    checks++;
    if (video_out[VIDEO_BITS-1 -: 3] !== 3'b0) begin failures++; $display("FAIL pad"); end
  endtask

  always @(posedge clk) if (valid_video_out && !reset_in) valid_count++;

  initial begin
    repeat (3) step(1343, 805);
    reset_in = 0;
    // start in the middle of line 5: nothing may be stored until hcount 0
    for (int h = 100; h < 1344; h++) step(h, 5);
    for (int h = 0; h < 1344; h++) begin
      step(h, 6);
      #1;
      checks++;
      if (valid_video_out) begin failures++; $display("FAIL early valid at h=%0d", h); end
    end
    // the full payload is emitted on the first in-area clock of line 7
    step(0, 7);
    @(posedge clk); #1;
    checks++;
    if (!valid_video_out) begin failures++; $display("FAIL no valid at line 7 h=0"); end
    else check_payload(6, 1'b0);
    step(1, 7);
    @(posedge clk); #1;
    checks++;
    if (valid_video_out) begin failures++; $display("FAIL valid longer than one clock"); end
    // rest of line 7 (no restart since hcount 0 was consumed), then line 8 is
    // captured with the camera off
    for (int h = 2; h < 1344; h++) step(h, 7);
    camera_off_in = 1;
    for (int h = 0; h < 1344; h++) step(h, 8);
    step(0, 9);
    @(posedge clk); #1;
    checks++;
    if (!valid_video_out) begin failures++; $display("FAIL no valid for line 8"); end
    else check_payload(8, 1'b1);
    // rows outside the picture store nothing
    camera_off_in = 0;
    for (int h = 1; h < 1344; h++) step(h, 9);
    for (int v = 240; v < 243; v++) for (int h = 0; h < 1344; h++) step(h, v);
    checks++;
    if (valid_count != 2) begin failures++; $display("FAIL valid_count=%0d", valid_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
