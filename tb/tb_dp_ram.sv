// tb_dp_ram: self-checking test of the dual-port RAM: random writes on port A with
// simultaneous random reads on port B, compared with a reference array (old data on a
// same-address collision), then a full read-back on both ports.
module tb_dp_ram;
  localparam int DW = 8, AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [AW-1:0] a_addr, b_addr; logic a_we; logic [DW-1:0] a_wdata, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  logic [DW-1:0] ref_mem [2**AW];
  logic [DW-1:0] exp_b;
  dp_ram #(.DW(DW), .AW(AW)) dut (.clk, .a_addr, .a_we, .a_wdata, .a_rdata, .b_addr, .b_rdata);
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    a_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); a_we = 1; a_addr = AW'(a); a_wdata = DW'($urandom); ref_mem[a] = a_wdata;
    end
    repeat (300) begin
      @(negedge clk); a_we = 1; a_addr = AW'($urandom); a_wdata = DW'($urandom);
      b_addr = ($urandom % 4 == 0) ? a_addr : AW'($urandom);
      exp_b = ref_mem[b_addr];
      @(posedge clk); #1;
      checks++;
      if (b_rdata !== exp_b) begin failures++; $display("B mismatch @%0d %h %h a%0d", b_addr, b_rdata, exp_b, a_addr); end
      ref_mem[a_addr] = a_wdata;
    end
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); a_we = 0; a_addr = AW'(a); b_addr = AW'(2**AW - 1 - a);
      @(posedge clk); #1;
      checks += 2;
      if (a_rdata !== ref_mem[a]) failures++;
      if (b_rdata !== ref_mem[2**AW-1-a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
