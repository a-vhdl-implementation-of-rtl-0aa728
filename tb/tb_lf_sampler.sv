// tb_lf_sampler: runs the sampler with short intervals (7 clocks even, 13 odd), drives
// random pulses, including bursts that saturate a count, and checks each of the 32
// writes: its address, its count (pulses seen in that interval, capped at 255) and its
// clock (the end of each interval), then done after the 32nd.
module tb_lf_sampler;
  localparam int DE = 7, DO = 13;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, odd, pulse, we, busy, done; logic [4:0] addr; logic [7:0] wdata;
  int checks = 0, failures = 0;
  lf_sampler #(.DIV_EVEN(DE), .DIV_ODD(DO), .N(32)) dut (.clk, .rst_n, .start_i(start),
    .odd_i(odd), .pulse_i(pulse), .m_we_o(we), .m_addr_o(addr), .m_wdata_o(wdata),
    .busy_o(busy), .done_o(done));
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int div;
  logic burst;
  initial begin
    pulse = 0; start = 0; odd = 0; burst = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      odd = run[0];
      div = odd ? DO : DE;
      @(negedge clk); start = 1; @(negedge clk); start = 0; odd = 0;
      while (!done) begin
        pulse = (run == 3) ? 1'b1 : (($urandom % 3) == 0);
        @(negedge clk);
      end
      checks++;
      if (exp_k != 32) begin failures++; $display("%0d writes in run %0d", exp_k, run); end
      pulse = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // independent check of written values: count pulses between writes
  int acc = 0, exp_k = 0, since = 0;
  always @(posedge clk) if (rst_n) begin
    if (start) begin acc = 0; exp_k = 0; since = 0; end
    else if (busy) begin
      acc += pulse; since++;
      if (we) begin
        checks += 3;
        if (addr != 5'(exp_k)) begin failures++; $display("addr %0d exp %0d", addr, exp_k); end
        if (wdata != 8'((acc > 255) ? 255 : acc)) begin failures++; $display("count %0d exp %0d", wdata, acc); end
        if (since != (odd_run ? DO : DE)) begin failures++; $display("interval %0d", since); end
        acc = 0; since = 0; exp_k++;
      end
    end
  end
  logic odd_run = 0;
  always @(posedge clk) if (start) odd_run <= odd;
endmodule
