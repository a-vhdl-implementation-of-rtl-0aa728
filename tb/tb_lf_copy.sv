// tb_lf_copy: copies a random 32-sample source array (modelled with a registered read,
// like M3) and checks every destination write, its order and the N+1 clock duration.
module tb_lf_copy;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, we, busy, done; logic [4:0] saddr, daddr; logic [7:0] srd, wd;
  logic [7:0] src [32];
  int checks = 0, failures = 0, nwr = 0, nbusy = 0;
  lf_copy #(.N(32)) dut (.clk, .rst_n, .start_i(start), .src_addr_o(saddr), .src_rdata_i(srd),
    .dst_we_o(we), .dst_addr_o(daddr), .dst_wdata_o(wd), .busy_o(busy), .done_o(done));
  always @(posedge clk) srd <= src[saddr];
  always @(posedge clk) if (rst_n) begin
    if (busy) nbusy++;
    if (we) begin
      checks += 2;
      if (daddr != 5'(nwr)) begin failures++; $display("write addr %0d exp %0d", daddr, nwr); end
      if (wd != src[daddr]) begin failures++; $display("data %h exp %h", wd, src[daddr]); end
      nwr++;
    end
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    start = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      foreach (src[a]) src[a] = 8'($urandom);
      nwr = 0; nbusy = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      checks += 2;
      if (nwr != 32) begin failures++; $display("%0d writes", nwr); end
      if (nbusy != 33) begin failures++; $display("%0d busy clocks", nbusy); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
