// dual_port_ram: simple dual-port block RAM with independent clocks.
//
// Port A writes dina to addra on clka when wea is high. Port B reads addrb on
// clkb and presents the word on doutb one clkb cycle later (registered read,
// as in an FPGA block RAM). The design uses it three times: as the camera
// frame buffer (written on the camera clock, read at 65 MHz), as the 33-bit
// sync buffer that carries {pixel, vcount, hcount} from 65 MHz to 50 MHz, and
// as the frame buffer for received video.
// The memory has no reset; read only what has been written.
module dual_port_ram #(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned DEPTH = 76800,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clka,
  input  logic             wea,
  input  logic [AW-1:0]    addra,
  input  logic [WIDTH-1:0] dina,
  input  logic             clkb,
  input  logic [AW-1:0]    addrb,
  output logic [WIDTH-1:0] doutb
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clka) begin
    if (wea && (32'(addra) < DEPTH)) mem[addra] <= dina;
  end

  always_ff @(posedge clkb) begin
    if (32'(addrb) < DEPTH) doutb <= mem[addrb];
    else                    doutb <= '0;
  end

endmodule
