// tb_sp_ram: self-checking test of the single-port RAM. Writes random words to random
// addresses, keeping a reference copy, then reads every written address back and
// checks the one-clock read latency and the read-first behaviour on a write.
module tb_sp_ram;
  localparam int DW = 16, AW = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [AW-1:0] addr; logic we; logic [DW-1:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [DW-1:0] ref_mem [2**AW];
  sp_ram #(.DW(DW), .AW(AW)) dut (.clk, .addr, .we, .wdata, .rdata);
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); we = 1; addr = AW'(a); wdata = DW'($urandom); ref_mem[a] = wdata;
    end
    repeat (200) begin
      @(negedge clk); we = 1; addr = AW'($urandom); wdata = DW'($urandom);
      @(posedge clk); #1;
      if (rdata !== ref_mem[addr]) begin failures++; $display("read-first mismatch @%0d", addr); end
      checks++;
      ref_mem[addr] = wdata;
    end
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); we = 0; addr = AW'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("mismatch @%0d %h %h", a, rdata, ref_mem[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
