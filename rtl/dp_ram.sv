// dp_ram: dual-port synchronous RAM. Port A reads and writes, port B only reads, both
// with a registered read (data the clock after the address). Used for the 1Kx8 HF
// histogramme (A: read-modify-write by the histogramme generator, B: block copy by the
// output process) and for the 512x10 storage of the LF circular FIFO. A port-B read of
// the address port A writes in the same cycle returns the old word. Not reset.
module dp_ram #(
  parameter int unsigned DW = 8,
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  input  logic          a_we,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic [AW-1:0] b_addr,
  output logic [DW-1:0] b_rdata
);
  logic [DW-1:0] mem [2**AW];
  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end
endmodule
