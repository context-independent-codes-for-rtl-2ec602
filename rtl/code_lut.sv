// code_lut: one code table, 2**AW entries of DW bits.
//
// A simple dual-port SRAM: one synchronous write port, used to load or change
// the code, and one read port with a registered output. A read enabled in
// cycle t delivers the entry on rdata after the clock edge that ends cycle t
// and holds it until the next enabled read. A write and a read of the same
// entry in one cycle return the old contents. Contents are not reset; the
// table must be loaded before it is used. 256 entries of 8 or 9 bits is the
// size a byte code needs.
module code_lut #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 9
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
