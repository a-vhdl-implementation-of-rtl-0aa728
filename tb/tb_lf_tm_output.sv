// tb_lf_tm_output: the LF Next O/P process with a real circ_fifo. Words are pushed,
// then requested one by one; each must reach load_o/word_o two clocks after its
// request and in FIFO order. Requests to an empty FIFO must give a zero word one clock
// later and an underrun flag.
module tb_lf_tm_output;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req, pop, rvalid, full, empty, ovf, push, load, und;
  logic [9:0] wdata, rdata, word; logic [4:0] count;
  int checks = 0, failures = 0, nund = 0;
  logic [9:0] q [$];
  circ_fifo #(.DW(10), .DEPTH(16)) u_f (.clk, .rst_n, .push_i(push), .wdata_i(wdata),
    .pop_i(pop), .rdata_o(rdata), .rvalid_o(rvalid), .full_o(full), .empty_o(empty),
    .count_o(count), .overflow_o(ovf));
  lf_tm_output dut (.clk, .rst_n, .tm_req_i(req), .fifo_empty_i(empty), .fifo_pop_o(pop),
    .fifo_rdata_i(rdata), .fifo_rvalid_i(rvalid), .load_o(load), .word_o(word),
    .underrun_o(und));
  always @(posedge clk) if (rst_n && und) nund++;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int lat;
    push = 0; req = 0; wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int round = 0; round < 5; round++) begin
      repeat (1 + $urandom % 12) begin
        @(negedge clk); push = 1; wdata = 10'($urandom); q.push_back(wdata);
      end
      @(negedge clk); push = 0;
      repeat (q.size() + 2) begin
        @(negedge clk); req = 1; @(negedge clk); req = 0; lat = 1;
        while (!load) begin @(negedge clk); lat++; end
        checks += 2;
        if (q.size() > 0) begin
          logic [9:0] e; e = q.pop_front();
          if (word != e) begin failures++; $display("word %h exp %h", word, e); end
          if (lat != 2) begin failures++; $display("latency %0d", lat); end
        end else begin
          if (word != 0) failures++;
          if (lat != 1) begin failures++; $display("empty latency %0d", lat); end
        end
        repeat (3) @(negedge clk);
      end
    end
    checks++; if (nund != 10) begin failures++; $display("underruns %0d", nund); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
