// circ_fifo: circular FIFO of the LF output path, DEPTH words of DW bits held in a
// dual-port RAM (write on port A, read on port B) with wrapping read and write pointers
// and an occupancy count. push_i with the FIFO full drops the word and pulses
// overflow_o (the source does not say what happens when the FIFO is full). pop_i with
// the FIFO empty is ignored. rdata_o is valid, with rvalid_o high, the clock after an
// accepted pop. DEPTH must be a power of two.
module circ_fifo #(
  parameter int unsigned DW    = 10,
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push_i,
  input  logic [DW-1:0]            wdata_i,
  input  logic                     pop_i,
  output logic [DW-1:0]            rdata_o,
  output logic                     rvalid_o,
  output logic                     full_o,
  output logic                     empty_o,
  output logic [$clog2(DEPTH):0]   count_o,
  output logic                     overflow_o
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          do_push, do_pop;
  logic [DW-1:0] a_rdata_unused;

  assign full_o  = (count_o == (AW+1)'(DEPTH));
  assign empty_o = (count_o == '0);
  assign do_push = push_i && !full_o;
  assign do_pop  = pop_i && !empty_o;

  dp_ram #(.DW(DW), .AW(AW)) u_mem (
    .clk, .a_addr(wr_ptr), .a_we(do_push), .a_wdata(wdata_i), .a_rdata(a_rdata_unused),
    .b_addr(rd_ptr), .b_rdata(rdata_o));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      count_o    <= '0;
      rvalid_o   <= 1'b0;
      overflow_o <= 1'b0;
    end else begin
      rvalid_o   <= do_pop;
      overflow_o <= push_i && full_o;
      if (do_push) wr_ptr <= wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= rd_ptr + 1'b1;
      count_o <= count_o + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  a_pow2: assert property (@(posedge clk) (2**AW) == DEPTH);
endmodule
