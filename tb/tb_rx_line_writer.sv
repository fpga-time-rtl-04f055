// tb_rx_line_writer: sends received video payloads at 50 MHz and records the
// frame-buffer writes made at 65 MHz. Each payload must give exactly 320
// writes, pixel i to address vcount*320+i, within 400 clocks; a payload whose
// vcount is outside the picture gives none.
module tb_rx_line_writer;
  import fpga_time_pkg::*;
  logic clk_50mhz = 0, clk_65mhz = 0, reset_50_in = 1, reset_65_in = 1;
  logic [VIDEO_BITS-1:0] video_in = '0;
  logic valid_in = 0, we_out;
  logic [16:0] addr_out;
  logic [11:0] pixel_out;
  logic [15:0] lines_written_out;
  int checks = 0, failures = 0;
  logic [11:0] written [int];
  int nwrites = 0;

  rx_line_writer dut (.*);
  always #10    clk_50mhz = ~clk_50mhz;
  always #7.692 clk_65mhz = ~clk_65mhz;

  always @(posedge clk_65mhz) if (we_out && !reset_65_in) begin written[int'(addr_out)] = pixel_out; nwrites++; end

  initial begin
    #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [VIDEO_BITS-1:0] v;
    int line;
    repeat (4) @(negedge clk_65mhz);
    reset_50_in = 0; reset_65_in = 0;
    repeat (4) @(negedge clk_50mhz);
    for (int n = 0; n < 12; n++) begin
      line = (n == 5) ? 240 + n : int'($urandom_range(0, 239));
      if (n == 0) line = 239;
      for (int i = 0; i < VIDEO_BITS; i += 32) v[i +: 32] = $urandom;
      v[10:0] = '0; v[20:11] = 10'(line);
      written.delete(); nwrites = 0;
      @(negedge clk_50mhz); video_in = v; valid_in = 1;
      @(negedge clk_50mhz); valid_in = 0; video_in = '0;
      repeat (400) @(negedge clk_65mhz);
      checks++;
      if (nwrites != (line < 240 ? 320 : 0)) begin failures++; $display("FAIL line %0d writes %0d", line, nwrites); end
      if (line < 240)
        for (int i = 0; i < 320; i++) begin
          checks++;
          if (!written.exists(line*320 + i) || written[line*320 + i] !== v[21 + 12*i +: 12]) begin
            failures++; if (failures < 10) $display("FAIL line %0d pixel %0d", line, i);
          end
        end
    end
    checks++;
    if (lines_written_out != 16'd11) begin failures++; $display("FAIL lines_written %0d", lines_written_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
