// tb_circ_fifo: random pushes and pops against a queue model on a 16-deep FIFO, with
// phases that fill it past full (dropped words must pulse overflow and not appear) and
// drain it past empty (ignored pops); checks data order, count, full and empty.
module tb_circ_fifo;
  localparam int DW = 10, DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, rvalid, full, empty, ovf; logic [DW-1:0] wdata, rdata;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0, novf = 0, exp_ovf = 0, nread = 0;
  logic [DW-1:0] q [$];
  circ_fifo #(.DW(DW), .DEPTH(DEPTH)) dut (.clk, .rst_n, .push_i(push), .wdata_i(wdata),
    .pop_i(pop), .rdata_o(rdata), .rvalid_o(rvalid), .full_o(full), .empty_o(empty),
    .count_o(count), .overflow_o(ovf));
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic pend_rd = 0; logic [DW-1:0] pend_val;
  always @(posedge clk) if (rst_n) begin
    if (rvalid) begin
      checks++; nread++;
      if (!pend_rd || rdata != pend_val) begin failures++; $display("read %h exp %h", rdata, pend_val); end
    end
    pend_rd = 0;
    checks++;
    if (count != ($clog2(DEPTH)+1)'(q.size()) || full != (q.size() == DEPTH) || empty != (q.size() == 0)) begin
      failures++; $display("count %0d model %0d", count, q.size());
    end
    begin
      int n0; n0 = q.size();
    if (push) begin
      if (n0 < DEPTH) q.push_back(wdata); else exp_ovf++;
    end
      if (pop && n0 > 0) begin pend_val = q.pop_front(); pend_rd = 1; end
    end
    if (ovf) novf++;
  end
  initial begin
    int pp, pq;
    push = 0; pop = 0; wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int ph = 0; ph < 8; ph++) begin
      pp = (ph % 2 == 0) ? 80 : 20; pq = 100 - pp;
      repeat (300) begin
        @(negedge clk);
        push = ($urandom % 100) < pp; pop = ($urandom % 100) < pq; wdata = DW'($urandom);
      end
    end
    @(negedge clk); push = 0; pop = 0;
    repeat (3) @(negedge clk);
    checks += 2;
    if (novf != exp_ovf || novf == 0) begin failures++; $display("overflow %0d exp %0d", novf, exp_ovf); end
    if (nread < 500) failures++;
    $display("reads %0d overflows %0d", nread, novf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
