// tb_lf_ctrl: the LF sequencer against behavioural stand-ins for the processes it
// starts (sampling: SAMP clocks, copy: 33, processing: 288, output: 33 clocks). Energy
// steps arrive with long and with short spacing. Checks, per step: output before copy
// before processing, processing and sampling started in the same clock after the copy,
// sampling interval parity = energy parity, nothing output or copied before there is
// something to output or copy, and a wait (stall) when a step comes during sampling.
module tb_lf_ctrl;
  localparam int SAMP = 400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pwrup_done, estep, one_bit, s_busy, s_done, c_done, p_busy, o_done;
  logic s_start, odd, c_start, p_start, p_one, o_start, o_one, estep_o, stall;
  logic [3:0] energy;
  int checks = 0, failures = 0, n_stall = 0, n_out = 0, n_copy = 0, n_proc = 0, n_samp = 0;
  lf_ctrl dut (.clk, .rst_n, .pwrup_done_i(pwrup_done), .estep_rise_i(estep),
    .last_energy_i(energy), .one_bit_i(one_bit), .samp_busy_i(s_busy), .samp_done_i(s_done),
    .copy_done_i(c_done), .proc_busy_i(p_busy), .out_done_i(o_done),
    .sample_start_o(s_start), .odd_o(odd), .copy_start_o(c_start), .proc_start_o(p_start),
    .proc_one_bit_o(p_one), .out_start_o(o_start), .out_one_bit_o(o_one), .estep_o,
    .stall_o(stall));
  // stand-ins
  int st = 0, ct = 0, pt = 0, ot = 0;
  always @(posedge clk) begin
    s_done <= 0; c_done <= 0; o_done <= 0;
    if (!rst_n) begin s_busy <= 0; p_busy <= 0; end
    else begin
      if (s_start) begin s_busy <= 1; st = SAMP; end
      else if (s_busy) begin st--; if (st == 0) begin s_busy <= 0; s_done <= 1; end end
      if (c_start) ct = 33; else if (ct > 0) begin ct--; if (ct == 0) c_done <= 1; end
      if (p_start) begin p_busy <= 1; pt = 288; end
      else if (p_busy) begin pt--; if (pt == 0) p_busy <= 0; end
      if (o_start) ot = 33; else if (ot > 0) begin ot--; if (ot == 0) o_done <= 1; end
    end
  end
  // order checks
  int phase = 0;  // 0 idle, 1 step seen, 2 output done or skipped, 3 copy done
  int step_no = 0; logic [3:0] step_energy; logic samples_ready = 0, results_ready = 0;
  logic step_one;
  always @(posedge clk) if (rst_n) begin
    if (stall) n_stall++;
    if (estep_o) begin phase = 1; step_no++; step_energy = energy; end
    if (o_start) begin
      n_out++; checks++;
      if (phase != 1 || !results_ready) begin failures++; $display("output out of order"); end
      if (o_one != step_one) begin failures++; $display("output mode"); end
    end
    if (c_start) begin
      n_copy++; checks += 2;
      if (phase != 1 || ot != 0) begin failures++; $display("copy out of order"); end
      if (!samples_ready || s_busy) begin failures++; $display("copy without samples"); end
      samples_ready = 0;
    end
    if (s_done) samples_ready = 1;
    if (p_start) begin
      n_proc++; checks += 2;
      if (!s_start || ct != 0) begin failures++; $display("processing start"); end
      if (p_one != one_bit) begin failures++; $display("proc mode"); end
      results_ready = 1; step_one = one_bit;
    end
    if (o_done) results_ready = 0;
    if (s_start) begin
      n_samp++; checks++;
      if (odd != step_energy[0]) begin failures++; $display("parity"); end
    end
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    estep = 0; energy = 0; one_bit = 0; pwrup_done = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // a step during power-up is ignored
    @(negedge clk); estep = 1; @(negedge clk); estep = 0;
    repeat (20) @(negedge clk);
    checks++; if (step_no != 0) failures++;
    pwrup_done = 1;
    for (int s = 0; s < 10; s++) begin
      repeat ((s == 5 || s == 6) ? 100 : 1000) @(negedge clk);
      energy = 4'($urandom); one_bit = (s % 3 == 2);
      @(negedge clk); estep = 1; @(negedge clk); estep = 0;
    end
    repeat (1500) @(negedge clk);
    checks += 4;
    if (step_no != 10) begin failures++; $display("steps %0d", step_no); end
    if (n_samp != 10) begin failures++; $display("sampling runs %0d", n_samp); end
    if (n_copy != 9 || n_proc != 9) begin failures++; $display("copies %0d proc %0d", n_copy, n_proc); end
    if (n_out != 8 || n_stall == 0) begin failures++; $display("outputs %0d stalls %0d", n_out, n_stall); end
    $display("outputs %0d copies %0d stall clocks %0d", n_out, n_copy, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
