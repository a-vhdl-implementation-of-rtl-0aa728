// sp_ram: single-port synchronous RAM (one address, write enable, registered read).
// Used for the 64x8 HF output array and the LF arrays M3 (samples being taken, 32x8),
// M2 (samples ready for processing, 32x8) and M1 (ACF sums, 16x16). A read returns the
// word at the address presented on the previous clock edge; a write stores wdata and
// the read register then shows the old contents (read-first). Contents are not reset,
// as in a block RAM; every user writes a location before reading it.
module sp_ram #(
  parameter int unsigned DW = 8,
  parameter int unsigned AW = 6
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];
  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
