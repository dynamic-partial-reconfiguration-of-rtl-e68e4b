// tile_ram: one bank of an on-chip tile buffer.
//
// A simple dual-port memory with one write port and one read port, both on
// the rising clock edge. The read data appears one cycle after the address
// (registered read, as a block RAM does); a read and a write of the same
// address in the same cycle return the old contents. The memory is not
// reset: every word is written before it is read.
module tile_ram #(
  parameter int DEPTH = 4096,
  parameter int W     = 16,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
