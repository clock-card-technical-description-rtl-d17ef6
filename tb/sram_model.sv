// sram_model: behavioural model of the clock card's on-board RAM.
//
// Byte-wide synchronous RAM of 2**AW bytes (2 MiB by default). A request
// is sampled at a rising clock edge: a write stores wdata at addr, a read
// returns the byte on rdata after that same edge and holds it until the
// next read. Contents start at zero. Used only by testbenches; on the card
// this is a purchased memory chip.
module sram_model #(
  parameter int unsigned AW = 21
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);
  logic [7:0] mem [2**AW];

  initial begin
    foreach (mem[i]) mem[i] = '0;
    rdata = '0;
  end

  always @(posedge clk) begin
    if (en && we)  mem[addr] <= wdata;
    if (en && !we) rdata <= mem[addr];
  end
endmodule
