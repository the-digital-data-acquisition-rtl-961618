// clu_lut_ram: one 4Kx4 lookup-table RAM of the Cosmic Logic Unit.
//
// The lookup side is read combinationally (the published part is a 25 ns
// static RAM sitting directly in the trigger path); the download side writes
// one word per clock when we is high. Contents are not reset: as with the
// real RAM, a table must be downloaded before use.
module clu_lut_ram #(
  parameter int unsigned ADDR_BITS = 12,
  parameter int unsigned DATA_BITS = 4
) (
  input  logic                 clk,
  input  logic [ADDR_BITS-1:0] addr,
  output logic [DATA_BITS-1:0] rdata,
  input  logic                 we,
  input  logic [ADDR_BITS-1:0] waddr,
  input  logic [DATA_BITS-1:0] wdata
);
  logic [DATA_BITS-1:0] mem [2**ADDR_BITS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
