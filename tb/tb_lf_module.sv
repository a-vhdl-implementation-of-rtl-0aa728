// tb_lf_module: the LF module alone with short sampling intervals (6 / 10 clocks) and a
// 64-word FIFO, driven by one-clock pulse strobes and energy-step strobes.
// The testbench counts the pulses of each sampling interval itself (timed from the
// sampler start), computes the ACF and 10-bit words of every series, and reads the
// words back through the serial telemetry. 8 steps are run without reading so the
// FIFO overflows (only the first 64 words survive), then 3 more steps, one of them
// with the one-bit mode, and one arriving during sampling; every word read is checked.
module tb_lf_module;
  localparam int DE = 6, DO = 10, FD = 64, NS = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ip1, ip2, estep, onebit, req, bitc, data, busy;
  logic e_o, st_o, pd_o, od_o, ovf, und, ld;
  logic [3:0] energy;
  int checks = 0, failures = 0, n_ovf = 0, n_stall = 0, n_one = 0, n_step = 0;
  lf_module #(.DIV_EVEN(DE), .DIV_ODD(DO), .FIFO_DEPTH(FD)) dut (.clk, .rst_n,
    .pwrup_done_i(1'b1), .ip1_rise_i(ip1), .ip2_rise_i(ip2), .estep_rise_i(estep),
    .last_energy_i(energy), .one_bit_i(onebit), .tm_req_i(req), .tm_bit_i(bitc),
    .tm_data_o(data), .tm_busy_o(busy), .estep_o(e_o), .stall_o(st_o), .proc_done_o(pd_o),
    .out_done_o(od_o), .overflow_o(ovf), .underrun_o(und), .load_o(ld));
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int series [NS+2][2][32];
  logic mode_of [NS+2];
  int nseries = 0, win_t, win_k, win_div, win_s;
  logic win_on = 0;
  always @(posedge clk) if (rst_n) begin
    n_ovf += int'(ovf); n_stall += int'(st_o); n_step += int'(e_o);
    if (win_on) begin
      series[win_s][0][win_k] += int'(ip1);
      series[win_s][1][win_k] += int'(ip2);
      win_t++;
      if (win_t == win_div) begin
        win_t = 0; win_k++;
        if (win_k == 32) win_on = 0;
      end
    end
    if (dut.proc_start) begin mode_of[nseries - 1] = dut.proc_one_bit; n_one += int'(dut.proc_one_bit); end
    if (dut.samp_start) begin
      win_s = nseries; nseries++; win_on = 1; win_t = 0; win_k = 0;
      win_div = dut.odd ? DO : DE;
      for (int c = 0; c < 2; c++) for (int k = 0; k < 32; k++) series[win_s][c][k] = 0;
    end
  end
  function automatic logic [9:0] exp_word(input int s, input int c, input int l);
    longint r, t; int len;
    r = 0;
    for (int i = 0; i < 16; i++)
      r += mode_of[s] ? longint'(series[s][c][i] != 0 && series[s][c][i+l] != 0)
                      : longint'(series[s][c][i] * series[s][c][i+l]);
    if (r > 65535) r = 65535;
    if (mode_of[s]) return 10'(r);
    len = 0; t = r;
    while (t != 0) begin len++; t = t >> 1; end
    if (len <= 6) return 10'(r);
    return {4'(len - 6), 6'((r >> (len - 7)) & 63)};
  endfunction
  task automatic get_word(output logic [9:0] w);
    @(negedge clk); req = 1; @(negedge clk); req = 0;
    while (!ld) @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      w = {w[8:0], data};
      bitc = 1; @(negedge clk); bitc = 0; @(negedge clk);
    end
  endtask
  task automatic step(input int e, input int len);
    energy = 4'(e);
    @(negedge clk); estep = 1; @(negedge clk); estep = 0;
    repeat (len) begin
      ip1 = ($urandom % 4) == 0; ip2 = ($urandom % 3) == 0;
      @(negedge clk);
    end
    ip1 = 0; ip2 = 0;
  endtask
  task automatic check_series(input int s);
    logic [9:0] w;
    for (int c = 0; c < 2; c++) for (int l = 1; l <= 16; l++) begin
      get_word(w);
      checks++;
      if (w != exp_word(s, c, l)) begin failures++; if (failures < 10) $display("series %0d ch %0d lag %0d: %h exp %h", s, c, l, w, exp_word(s, c, l)); end
    end
  endtask
  initial begin
    ip1 = 0; ip2 = 0; estep = 0; onebit = 0; req = 0; bitc = 0; energy = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int s = 0; s < 8; s++) step(s, 32 * ((s % 2) ? DO : DE) + 400);
    // 6 series were output (series 0..5); the FIFO keeps series 0 and 1
    check_series(0);
    check_series(1);
    onebit = 1;
    step(8, 100);               // the next step arrives during this step's sampling
    onebit = 0;
    step(10, 32 * DE + 400);
    check_series(6);            // output at step 8
    check_series(7);            // output at step 10, processed in one-bit mode
    step(12, 32 * DE + 400);
    check_series(8);
    checks += 4;
    if (n_ovf != 4 * 32) begin failures++; $display("overflows %0d", n_ovf); end
    if (n_stall == 0) begin failures++; $display("no stall"); end
    if (n_one == 0) begin failures++; $display("no one-bit run"); end
    if (n_step != 11) begin failures++; $display("steps %0d", n_step); end
    $display("overflowed words %0d, stall clocks %0d", n_ovf, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
