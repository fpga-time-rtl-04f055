// tb_audio_sample_trigger: checks that the strobe is one clock wide and comes
// every 50e6/48e3 = 1041 clocks.
module tb_audio_sample_trigger;
  logic clk = 0, reset_in = 1, trigger_out;
  int checks = 0, failures = 0, last = -1, cyc = 0, n = 0;
  audio_sample_trigger dut (.*);
  always #10 clk = ~clk;
  initial begin
    #5ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) begin
    cyc++;
    if (!reset_in && trigger_out) begin
      if (last >= 0) begin
        checks++;
        if (cyc - last != 1041) begin failures++; $display("FAIL period %0d", cyc - last); end
      end
      last = cyc; n++;
    end
  end
  initial begin
    repeat (3) @(negedge clk);
    reset_in = 0;
    wait (n == 20);
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
