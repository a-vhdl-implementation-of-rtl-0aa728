// tb_powerup_ctrl: checks that the power-up sweep visits every address once, in order,
// with busy high for exactly 2**AW clocks, and that done then stays high.
module tb_powerup_ctrl;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic busy; logic [AW-1:0] addr; logic done;
  int checks = 0, failures = 0, nbusy = 0;
  powerup_ctrl #(.AW(AW)) dut (.clk, .rst_n, .busy_o(busy), .addr_o(addr), .done_o(done));
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (1) begin
      @(posedge clk); #1;
      if (!busy) break;
      checks++;
      if (addr !== AW'(nbusy + 1) && nbusy + 1 < 2**AW) begin failures++; $display("addr %0d at %0d", addr, nbusy); end
      nbusy++;
    end
    checks++;
    if (nbusy + 1 != 2**AW) begin failures++; $display("busy clocks %0d", nbusy + 1); end
    repeat (50) begin
      @(posedge clk); #1; checks++;
      if (!done || busy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
