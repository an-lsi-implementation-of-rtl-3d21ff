// sram_32kx16: behavioural model of the 32K x 16 asynchronous static RAM used
// as the GAA System Memory (simulation only). Reads are combinational from
// the address; a write takes effect at the clock edge where `we` is high.
// Contents start at zero.
module sram_32kx16 (
  input  logic        clk,
  input  logic [14:0] addr,
  input  logic        oe,
  input  logic        we,
  input  logic [15:0] wdata,
  output logic [15:0] rdata
);
  logic [15:0] mem [0:32767];

  initial begin
    for (int i = 0; i < 32768; i++) mem[i] = '0;
  end

  always @(posedge clk) if (we) mem[addr] <= wdata;

  assign rdata = oe ? mem[addr] : 16'h0000;
endmodule
