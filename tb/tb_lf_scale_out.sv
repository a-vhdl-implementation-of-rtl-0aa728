// tb_lf_scale_out: fills two testbench models of M1 (registered read) with sums over
// the whole 16-bit range and checks the 32 words pushed: order (channel 1 lags 1..16,
// then channel 2), one-bit words passed unchanged, and multibit words against an
// independently written compression: exponent = bit length - 6, mantissa = the six
// bits below the leading one; also that the code expands back to within 1/64.
module tb_lf_scale_out;
  import sval_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, one_bit, push, busy, done; logic [3:0] raddr; logic [15:0] rdata [2];
  logic [9:0] wdata;
  logic [15:0] m1 [2][16];
  int checks = 0, failures = 0, npush = 0, nbusy = 0;
  logic mode;
  lf_scale_out dut (.clk, .rst_n, .start_i(start), .one_bit_i(one_bit), .m1_raddr_o(raddr),
    .m1_rdata_i(rdata), .push_o(push), .wdata_o(wdata), .busy_o(busy), .done_o(done));
  always @(posedge clk) begin rdata[0] <= m1[0][raddr]; rdata[1] <= m1[1][raddr]; end
  function automatic logic [9:0] ref_code(input logic [15:0] v);
    int len; logic [15:0] t;
    len = 0; t = v;
    while (t != 0) begin len++; t = t >> 1; end
    if (len <= 6) return {4'd0, v[5:0]};
    return {4'(len - 6), 6'((v >> (len - 7)) & 16'h3f)};
  endfunction
  always @(posedge clk) if (rst_n) begin
    if (busy) nbusy++;
    if (push) begin
      logic [15:0] v; longint back;
      v = m1[npush / 16][npush % 16];
      checks++;
      if (mode) begin
        if (wdata != 10'(v)) begin failures++; $display("one-bit word %0d: %0d exp %0d", npush, wdata, v); end
      end else begin
        if (wdata != ref_code(v)) begin failures++; $display("word %0d: %h exp %h (v=%0d)", npush, wdata, ref_code(v), v); end
        back = longint'(expand10(wdata));
        checks++;
        if (back > longint'(v) || (longint'(v) - back) * 64 > longint'(v)) begin failures++; $display("expand %0d of %0d", back, v); end
      end
      npush++;
    end
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    start = 0; one_bit = 0; mode = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 8; run++) begin
      mode = (run % 4 == 3);
      for (int c = 0; c < 2; c++) for (int l = 0; l < 16; l++)
        m1[c][l] = mode ? 16'($urandom % 17) : 16'($urandom) >> ($urandom % 16);
      npush = 0; nbusy = 0;
      @(negedge clk); start = 1; one_bit = mode; @(negedge clk); start = 0; one_bit = 0;
      while (!done) @(negedge clk);
      checks += 2;
      if (npush != 32) begin failures++; $display("%0d words", npush); end
      if (nbusy != 33) begin failures++; $display("%0d busy clocks", nbusy); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
