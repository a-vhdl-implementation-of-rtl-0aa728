// tb_sval_top: end-to-end test of the whole design at its default sizes (1Kx8
// histogramme, 400/1200-clock LF sampling intervals, 512-word LF FIFO).
// Stimulus: power-up, then 20 energy steps with pulse trains on both detector inputs
// (pulses 3 clocks wide); one step comes during sampling, some steps have odd energy,
// the one-bit mode telecommand is on for some steps, one LF telemetry request comes
// before any data exists, and the LF FIFO is left unread until it overflows.
// Reference models kept by the testbench: the HF histogramme of pulse spacings per
// energy / channel / delay, and the LF pulse counts of each sampling interval (timed
// from the sampler start it observes), their 16-lag ACF and 10-bit coding.
// Checks: every HF byte of all 16 blocks read back through the HF serial telemetry,
// every LF word read back through the LF serial telemetry, and that each mechanism
// (power-up clear, histogramme update, HF energy step, HF block copy, LF energy step,
// synch-point stall, multibit and one-bit processing, FIFO overflow, telemetry
// underrun) happened at least once.
module tb_sval_top;
  import sval_pkg::*;
  localparam int DE = 400, DO = 1200, FD = 512, NSTEP = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ip1, ip2, estep, onebit, hreq, hbit, hdata, lreq, lbit, ldata;
  logic [3:0] energy;
  logic pw_done, hf_upd, hf_est, hf_copy, lf_est, lf_stall, lf_pdone, lf_ovf, lf_und;
  int checks = 0, failures = 0;
  int n_pw = 0, n_upd = 0, n_hest = 0, n_hcopy = 0, n_lest = 0, n_stall = 0;
  int n_multi = 0, n_one = 0, n_ovf = 0, n_und = 0;

  sval_top dut (.clk, .rst_n, .ip1_i(ip1), .ip2_i(ip2), .new_estep_i(estep),
    .last_energy_i(energy), .one_bit_mode_i(onebit), .tm_hf_req_i(hreq), .tm_hf_bit_i(hbit),
    .tm_hf_data_o(hdata), .tm_lf_req_i(lreq), .tm_lf_bit_i(lbit), .tm_lf_data_o(ldata),
    .pwrup_done_o(pw_done), .hf_update_o(hf_upd), .hf_estep_o(hf_est), .hf_copy_o(hf_copy),
    .lf_estep_o(lf_est), .lf_stall_o(lf_stall), .lf_proc_done_o(lf_pdone),
    .lf_overflow_o(lf_ovf), .lf_underrun_o(lf_und));

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- event counters ----------------
  logic pw_seen = 0;
  always @(posedge clk) if (rst_n) begin
    if (pw_done && !pw_seen) begin n_pw++; pw_seen = 1; end
    n_upd += int'(hf_upd); n_hest += int'(hf_est); n_hcopy += int'(hf_copy);
    n_lest += int'(lf_est); n_stall += int'(lf_stall); n_ovf += int'(lf_ovf);
    n_und += int'(lf_und);
    if (lf_pdone) begin if (dut.u_lf.proc_one_bit) n_one++; else n_multi++; end
  end

  // ---------------- HF reference ----------------
  logic [7:0] ref_h [1024];
  int hf_e;                       // energy level the HF base points at
  task automatic hf_channel(input int c, input int nclk, ref logic p);
    int gap, t;
    t = 0;
    @(negedge clk); p = 1; repeat (3) @(negedge clk); p = 0; t += 3;
    while (t < nclk) begin
      gap = 4 + $urandom % 40;
      repeat (gap - 3) @(negedge clk);
      p = 1;
      if (gap < 32) ref_h[hf_e * 64 + c * 32 + gap]++;
      repeat (3) @(negedge clk); p = 0;
      t += gap;
    end
  endtask

  // ---------------- LF reference ----------------
  // Pulse counts of each sampling run, timed from the sampler start, from the
  // synchronised pulse strobes the samplers see.
  int series [NSTEP+2][2][32];
  int nseries = 0;
  logic series_done [NSTEP+2];
  logic mode_of [NSTEP+2];          // mode the series is processed in
  int win_t, win_k, win_div, win_s;
  logic win_on = 0;
  always @(posedge clk) if (rst_n) begin
    if (win_on) begin
      series[win_s][0][win_k] += int'(dut.ip1_r);
      series[win_s][1][win_k] += int'(dut.ip2_r);
      win_t++;
      if (win_t == win_div) begin
        win_t = 0; win_k++;
        if (win_k == 32) begin win_on = 0; series_done[win_s] = 1; end
      end
    end
    if (dut.u_lf.proc_start) mode_of[nseries - 1] = dut.u_lf.proc_one_bit;
    if (dut.u_lf.samp_start) begin
      win_s = nseries; nseries++; win_on = 1; win_t = 0; win_k = 0;
      win_div = dut.u_lf.odd ? DO : DE;
      for (int c = 0; c < 2; c++) for (int k = 0; k < 32; k++) series[win_s][c][k] = 0;
      series_done[win_s] = 0;
    end
  end
  function automatic logic [9:0] lf_word(input int s, input int c, input int l);
    longint r; int len; longint t;
    r = 0;
    for (int i = 0; i < 16; i++) begin
      int a, b;
      a = series[s][c][i] > 255 ? 255 : series[s][c][i];
      b = series[s][c][i+l] > 255 ? 255 : series[s][c][i+l];
      r += mode_of[s] ? longint'(a != 0 && b != 0) : longint'(a * b);
    end
    if (r > 65535) r = 65535;
    if (mode_of[s]) return 10'(r);
    len = 0; t = r;
    while (t != 0) begin len++; t = t >> 1; end
    if (len <= 6) return 10'(r);
    return {4'(len - 6), 6'((r >> (len - 7)) & 63)};
  endfunction

  // ---------------- telemetry readers ----------------
  task automatic hf_byte(output logic [7:0] b);
    @(negedge clk); hreq = 1; repeat (2) @(negedge clk); hreq = 0;
    while (!dut.u_hf.load_o) @(negedge clk);
    repeat (2) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      b = {b[6:0], hdata};
      hbit = 1; repeat (2) @(negedge clk); hbit = 0; repeat (3) @(negedge clk);
    end
  endtask
  task automatic lf_word_rx(output logic [9:0] w);
    @(negedge clk); lreq = 1; repeat (2) @(negedge clk); lreq = 0;
    while (!dut.u_lf.load_o) @(negedge clk);
    repeat (2) @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      w = {w[8:0], ldata};
      lbit = 1; repeat (2) @(negedge clk); lbit = 0; repeat (3) @(negedge clk);
    end
  endtask

  // ---------------- stimulus ----------------
  int e_seq [NSTEP] = '{0, 2, 1, 4, 6, 3, 8, 10, 12, 14, 5, 0, 2, 4, 6, 8, 10, 12, 14, 7};
  initial begin
    logic [7:0] b; logic [9:0] w;
    int len;
    ip1 = 0; ip2 = 0; estep = 0; onebit = 0; hreq = 0; hbit = 0; lreq = 0; lbit = 0;
    energy = 0; hf_e = 0;
    foreach (ref_h[a]) ref_h[a] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    while (!pw_done) @(negedge clk);
    // LF telemetry request with nothing to send
    lf_word_rx(w);
    checks++; if (w != 0) failures++;
    for (int s = 0; s < NSTEP; s++) begin
      energy = 4'(e_seq[s]);
      onebit = (s == 6 || s == 7 || s == 15);
      repeat (4) @(negedge clk);
      estep = 1; repeat (4) @(negedge clk); estep = 0;
      while (n_hest != s + 1) @(negedge clk);
      hf_e = e_seq[s];
      repeat (8) @(negedge clk);
      // step 9 is cut short: the next step arrives in the middle of sampling
      len = (s == 9) ? 3000 : 32 * ((e_seq[s] % 2) ? DO : DE) + 600;
      fork
        hf_channel(0, len, ip1);
        hf_channel(1, len, ip2);
      join
      repeat (60) @(negedge clk);
    end
    // let the last processing finish
    repeat (2000) @(negedge clk);
    // LF: series s is output at step s+2; FIFO keeps the first FD words
    begin
      int nw, s, c, l;
      nw = 0;
      for (s = 0; s + 2 < NSTEP && nw < FD; s++)
        for (c = 0; c < 2; c++) for (l = 1; l <= 16; l++) begin
          lf_word_rx(w);
          checks++;
          if (w != lf_word(s, c, l)) begin
            failures++; if (failures < 10) $display("LF series %0d ch %0d lag %0d: %h exp %h", s, c, l, w, lf_word(s, c, l));
          end
          nw++;
        end
    end
    // HF: all 16 blocks, in block order
    for (int r = 0; r < 1024; r++) begin
      hf_byte(b);
      checks++;
      if (b != ref_h[r]) begin failures++; if (failures < 20) $display("HF byte %0d = %0d exp %0d", r, b, ref_h[r]); end
    end
    $display("power-up %0d, histogramme updates %0d, HF steps %0d, HF block copies %0d",
             n_pw, n_upd, n_hest, n_hcopy);
    $display("LF steps %0d, stall clocks %0d, multibit ACF %0d, one-bit ACF %0d, FIFO overflows %0d, underruns %0d",
             n_lest, n_stall, n_multi, n_one, n_ovf, n_und);
    checks += 10;
    if (n_pw != 1)        begin failures++; $display("power-up not seen"); end
    if (n_upd == 0)       begin failures++; $display("no histogramme update"); end
    if (n_hest != NSTEP)  begin failures++; $display("HF steps %0d", n_hest); end
    if (n_hcopy != 16)    begin failures++; $display("HF copies %0d", n_hcopy); end
    if (n_lest != NSTEP)  begin failures++; $display("LF steps %0d", n_lest); end
    if (n_stall == 0)     begin failures++; $display("no synch stall"); end
    if (n_multi == 0)     begin failures++; $display("no multibit ACF"); end
    if (n_one == 0)       begin failures++; $display("no one-bit ACF"); end
    if (n_ovf == 0)       begin failures++; $display("no FIFO overflow"); end
    if (n_und == 0)       begin failures++; $display("no underrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
