// tb_cdc_sync: drives random values into the synchroniser and checks that
// each appears on the output exactly two clocks later.
module tb_cdc_sync;
  logic clk = 0;
  logic [7:0] d_in = '0, q_out;
  logic [7:0] hist [3];
  int checks = 0, failures = 0;
  cdc_sync #(.WIDTH(8)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100us; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      if (i >= 3) begin
        checks++;
        if (q_out !== hist[1]) begin failures++; $display("FAIL i=%0d q=%h exp=%h", i, q_out, hist[1]); end
      end
      hist[2] = hist[1]; hist[1] = hist[0];
      d_in = 8'($urandom); hist[0] = d_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
