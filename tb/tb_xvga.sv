// tb_xvga: runs one and a bit frames and checks the 1344-clock line, the
// 806-line frame, the sync pulse widths and positions and the blanking area.
module tb_xvga;
  logic clk = 0, reset_in = 1;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic hsync, vsync, blank;
  int checks = 0, failures = 0;
  int hs_low = 0, vs_lines = 0, frames = 0;
  int prev_h = -1;

  xvga dut (.*);
  always #7.692 clk = ~clk;

  initial begin
    #40ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (!reset_in) begin
    checks++;
    if (hsync !== !(hcount >= 1048 && hcount < 1184)) begin failures++; if (failures < 10) $display("FAIL hsync at %0d", hcount); end
    if (vsync !== !(vcount >= 771 && vcount < 777)) begin failures++; if (failures < 10) $display("FAIL vsync at %0d", vcount); end
    if (blank !== (hcount >= 1024 || vcount >= 768)) begin failures++; if (failures < 10) $display("FAIL blank"); end
    if (prev_h >= 0 && !(hcount == prev_h + 1 || (prev_h == 1343 && hcount == 0))) begin failures++; $display("FAIL hcount step"); end
    if (hcount > 1343 || vcount > 805) failures++;
    if (hcount == 0 && vcount == 0 && prev_h == 1343) frames++;
    prev_h = int'(hcount);
  end

  initial begin
    repeat (3) @(negedge clk);
    reset_in = 0;
    repeat (1344 * 806 + 2000) @(negedge clk);
    checks++;
    if (frames != 1) begin failures++; $display("FAIL frames %0d", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
