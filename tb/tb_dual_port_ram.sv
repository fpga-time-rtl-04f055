// tb_dual_port_ram: writes random words through port A (100 MHz) and reads
// them back through port B on an unrelated 65 MHz clock, checking the data and
// the one-clock read latency. Stored words are also offered again with
// inverted data and the write enable low, which must leave them unchanged.
module tb_dual_port_ram;
  localparam int W = 12, D = 76800, AW = $clog2(D);
  logic clka = 0, clkb = 0, wea = 0;
  logic [AW-1:0] addra = '0, addrb = '0;
  logic [W-1:0] dina = '0, doutb;
  int checks = 0, failures = 0;
  logic [W-1:0] model [int];

  dual_port_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clka = ~clka;
  always #7.692 clkb = ~clkb;

  initial begin
    #5ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int a;
    for (int i = 0; i < 500; i++) begin
      @(negedge clka);
      a = (i < 3) ? (i == 0 ? 0 : (i == 1 ? D-1 : 1)) : int'($urandom_range(0, D-1));
      wea = 1; addra = AW'(a); dina = W'($urandom); model[a] = dina;
    end
    @(negedge clka); wea = 0;
    // with the write enable low, address and data changes must not write
    foreach (model[k]) begin
      @(negedge clka); addra = AW'(k); dina = ~model[k];
    end
    foreach (model[k]) begin
      @(negedge clkb); addrb = AW'(k);
      @(posedge clkb); #1;
      checks++;
      if (doutb !== model[k]) begin failures++; $display("FAIL addr %0d got %h exp %h", k, doutb, model[k]); end
    end
    // latency: change address, data must not change before the next clkb edge
    @(negedge clkb); addrb = 0;
    @(posedge clkb); #1;
    addrb = AW'(D-1); #2;
    checks++; if (doutb !== model[0]) begin failures++; $display("FAIL latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
