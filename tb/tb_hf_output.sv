// tb_hf_output: the HF Next O/P process with a histogramme RAM filled with random bytes
// by the testbench and the 64x8 output array. Issues 3 x 64 + 5 telemetry requests and
// checks that the bytes come out block after block, in address order, that a plain
// request is answered in 1 clock and a request needing a block copy in 68 clocks, and
// that a request during power-up waits.
module tb_hf_output;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable, req, load, copy_f; logic [9:0] h_addr, a_addr; logic [7:0] h_rdata, a_rdata;
  logic [5:0] o_addr; logic o_we; logic [7:0] o_wdata, o_rdata, byte_v, a_wdata; logic a_we;
  logic [3:0] block;
  int checks = 0, failures = 0, n_copy = 0;
  logic [7:0] ref_h [1024];
  hf_output dut (.clk, .rst_n, .enable_i(enable), .tm_req_i(req), .h_addr_o(h_addr),
    .h_rdata_i(h_rdata), .o_addr_o(o_addr), .o_we_o(o_we), .o_wdata_o(o_wdata),
    .o_rdata_i(o_rdata), .load_o(load), .byte_o(byte_v), .copy_o(copy_f), .block_o(block));
  dp_ram #(.DW(8), .AW(10)) u_h (.clk, .a_addr, .a_we, .a_wdata, .a_rdata, .b_addr(h_addr), .b_rdata(h_rdata));
  sp_ram #(.DW(8), .AW(6)) u_o (.clk, .addr(o_addr), .we(o_we), .wdata(o_wdata), .rdata(o_rdata));
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n && copy_f) n_copy++;
  task automatic request(output int lat, output logic [7:0] b);
    @(negedge clk); req = 1; lat = 0;
    @(negedge clk); req = 0;
    lat = 1;
    while (!load) begin @(negedge clk); lat++; if (lat > 500) break; end
    b = byte_v;
  endtask
  initial begin
    int lat; logic [7:0] b; int exp_lat;
    req = 0; enable = 0; a_we = 0; a_addr = 0; a_wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); a_we = 1; a_addr = 10'(a); a_wdata = 8'($urandom); ref_h[a] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    // a request while disabled (power-up) is held
    @(negedge clk); req = 1; @(negedge clk); req = 0;
    repeat (100) @(negedge clk);
    checks++; if (n_copy != 0) failures++;
    enable = 1;
    while (!load) @(negedge clk);
    checks++; if (byte_v != ref_h[0]) failures++;
    for (int r = 1; r < 3 * 64 + 5; r++) begin
      repeat ($urandom % 12) @(negedge clk);
      request(lat, b);
      exp_lat = (r % 64 == 0) ? 68 : 1;
      checks += 2;
      if (b != ref_h[r]) begin failures++; $display("byte %0d = %h exp %h", r, b, ref_h[r]); end
      if (lat != exp_lat) begin failures++; $display("req %0d latency %0d exp %0d", r, lat, exp_lat); end
    end
    checks++; if (n_copy != 4 || block != 4'd3) begin failures++; $display("copies %0d block %0d", n_copy, block); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
