// tb_lf_acf_proc: the ACF processor against a reference ACF computed in the testbench.
// For each run a random 32-sample series is written through the pre-load port (as the
// copy process does) into a testbench model of M2; the 16 sums written to M1 are
// compared with R_L = sum_{i=0..15} x[i]*x[i+L] (saturated to 16 bits), in multibit
// and one-bit mode, with small and with full-scale samples. Checks the 288-clock run.
module tb_lf_acf_proc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, one_bit, pre_we, m1_we, busy, done;
  logic [4:0] pre_addr, m2_addr; logic [7:0] pre_data, m2_rdata; logic [3:0] m1_addr;
  logic [15:0] m1_wdata;
  logic [7:0] m2 [32];
  logic [15:0] m1 [16];
  int checks = 0, failures = 0, nbusy = 0;
  lf_acf_proc #(.N(32)) dut (.clk, .rst_n, .start_i(start), .one_bit_i(one_bit),
    .pre_we_i(pre_we), .pre_addr_i(pre_addr), .pre_data_i(pre_data), .m2_addr_o(m2_addr),
    .m2_rdata_i(m2_rdata), .m1_we_o(m1_we), .m1_addr_o(m1_addr), .m1_wdata_o(m1_wdata),
    .busy_o(busy), .done_o(done));
  always @(posedge clk) begin
    if (pre_we) m2[pre_addr] <= pre_data;
    m2_rdata <= m2[m2_addr];
    if (m1_we) m1[m1_addr] <= m1_wdata;
    if (rst_n && busy) nbusy++;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] x [32];
    longint r;
    start = 0; one_bit = 0; pre_we = 0; pre_addr = 0; pre_data = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      for (int a = 0; a < 32; a++)
        case (run % 3)
          0: x[a] = 8'($urandom % 6);
          1: x[a] = ($urandom % 2) ? 8'($urandom) : 8'd0;
          default: x[a] = 8'd200 + 8'($urandom % 56);
        endcase
      for (int a = 0; a < 32; a++) begin
        @(negedge clk); pre_we = 1; pre_addr = 5'(a); pre_data = x[a];
      end
      @(negedge clk); pre_we = 0;
      one_bit = (run >= 3);
      nbusy = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0; one_bit = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      checks++;
      if (nbusy != 288) begin failures++; $display("busy %0d clocks", nbusy); end
      for (int l = 1; l <= 16; l++) begin
        r = 0;
        for (int i = 0; i < 16; i++)
          r += (run >= 3) ? longint'(x[i] != 0 && x[i+l] != 0) : longint'(x[i]) * longint'(x[i+l]);
        if (r > 65535) r = 65535;
        checks++;
        if (m1[l-1] != 16'(r)) begin failures++; $display("run %0d lag %0d: %0d exp %0d", run, l, m1[l-1], r); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
