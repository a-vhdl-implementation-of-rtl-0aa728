// tb_lf_channel: one LF channel end to end with short sampling intervals (5/9 clocks).
// The testbench counts the pulses it sends in each interval itself, then runs
// sample -> copy -> process as the controller would, reads the 16 sums through the M1
// read port and compares them with the ACF of its own counts. Also starts a second
// sampling run right after the copy, concurrently with the processing.
module tb_lf_channel;
  localparam int DE = 5, DO = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pulse, s_start, odd, c_start, p_start, one_bit;
  logic s_busy, s_done, c_busy, c_done, p_busy, p_done;
  logic [3:0] raddr; logic [15:0] rdata;
  int checks = 0, failures = 0;
  lf_channel #(.DIV_EVEN(DE), .DIV_ODD(DO)) dut (.clk, .rst_n, .pulse_i(pulse),
    .sample_start_i(s_start), .odd_i(odd), .copy_start_i(c_start), .proc_start_i(p_start),
    .one_bit_i(one_bit), .m1_raddr_i(raddr), .m1_rdata_o(rdata),
    .sample_busy_o(s_busy), .sample_done_o(s_done), .copy_busy_o(c_busy),
    .copy_done_o(c_done), .proc_busy_o(p_busy), .proc_done_o(p_done));
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int cnt [32];
  int cur [32];
  task automatic pulse_series(input int div, input int rate);
    // one pulse decision per clock; counts follow the interval structure from start
    for (int k = 0; k < 32; k++) begin
      cur[k] = 0;
      for (int t = 0; t < div; t++) begin
        pulse = ($urandom % 100) < rate;
        cur[k] += pulse;
        @(negedge clk);
      end
    end
    pulse = 0;
  endtask
  task automatic start(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask
  initial begin
    longint r;
    pulse = 0; s_start = 0; odd = 0; c_start = 0; p_start = 0; one_bit = 0; raddr = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      odd = run[0];
      @(negedge clk); s_start = 1; @(negedge clk); s_start = 0;
      pulse_series(run[0] ? DO : DE, 20 + 20 * run);
      while (s_busy) @(negedge clk);
      cnt = cur;
      start(c_start);
      while (c_busy || c_done) @(negedge clk);
      one_bit = (run == 3);
      @(negedge clk); p_start = 1; s_start = 1; @(negedge clk); p_start = 0; s_start = 0;
      while (p_busy) @(negedge clk);
      for (int l = 1; l <= 16; l++) begin
        raddr = 4'(l - 1); @(negedge clk);
        r = 0;
        for (int i = 0; i < 16; i++)
          r += (run == 3) ? longint'(cnt[i] != 0 && cnt[i+l] != 0) : longint'(cnt[i] * cnt[i+l]);
        checks++;
        if (rdata != 16'(r)) begin failures++; $display("run %0d lag %0d: %0d exp %0d", run, l, rdata, r); end
      end
      while (s_busy) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
