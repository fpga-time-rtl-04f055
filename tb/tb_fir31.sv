// tb_fir31: impulse response, random input against a direct convolution with
// the documented coefficient formula's integer taps, saturation, and the
// 32-clock result latency.
module tb_fir31;
  logic clk = 0, reset_in = 1, ready_in = 0;
  logic signed [7:0] x_in = '0;
  logic signed [17:0] y_out;
  int checks = 0, failures = 0;
  // taps: round(1024 * w[n]*sinc / sum), fc = 3 kHz at 48 kHz, Hamming window
  int taps [31] = '{-1,-1,-3,-5,-6,-7,-5,0,10,26,46,69,91,110,123,128,123,110,91,69,46,26,10,0,-5,-7,-6,-5,-3,-1,-1};
  int hist [31];
  int prev_exp = 0;

  fir31 dut (.*);
  always #10 clk = ~clk;

  initial begin
    #10ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic push(int x);
    int expv;
    @(negedge clk);
    ready_in = 1; x_in = 8'(x);
    for (int i = 30; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = x;
    @(negedge clk); ready_in = 0;
    expv = 0;
    for (int i = 0; i < 31; i++) expv += taps[i] * hist[i];
    if (expv > 131071) expv = 131071;
    if (expv < -131072) expv = -131072;
    repeat (30) @(negedge clk);
    checks++;                       // 31 clocks after the strobe: old result
    if (y_out !== 18'(prev_exp)) begin failures++; $display("FAIL early change y=%0d", y_out); end
    @(negedge clk);
    checks++;
    if (y_out !== 18'(expv)) begin failures++; if (failures < 10) $display("FAIL y=%0d exp=%0d", y_out, expv); end
    prev_exp = expv;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < 31; i++) hist[i] = 0;
    repeat (3) @(negedge clk);
    reset_in = 0;
    push(100);
    for (int i = 0; i < 35; i++) push(0);
    for (int i = 0; i < 200; i++) push(int'($signed(8'($urandom))));
    for (int i = 0; i < 40; i++) push(127);     // DC gain about 1
    checks++;
    if (y_out[17:10] < 8'sd120) begin failures++; $display("FAIL DC gain %0d", y_out[17:10]); end
    for (int i = 0; i < 40; i++) push(-128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
