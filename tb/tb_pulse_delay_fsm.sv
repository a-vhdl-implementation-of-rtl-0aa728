// tb_pulse_delay_fsm: drives one-clock pulses at random spacings and checks that every
// spacing below 32 clocks is reported once, as that number of lags, on the clock after
// the closing pulse, that spacings of 32 or more are not reported, and that a delay
// left waiting when the next one arrives is replaced and flagged as lost.
module tb_pulse_delay_fsm;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pulse, valid, ready, lost; logic [4:0] delay;
  int checks = 0, failures = 0, nlost = 0, nrep = 0;
  int exp_q [$];
  pulse_delay_fsm #(.LAG_W(5), .LAG_DIV(1)) dut (.clk, .rst_n, .pulse_i(pulse),
    .valid_o(valid), .delay_o(delay), .ready_i(ready), .lost_o(lost));
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // consumer: always ready in phase 1, holds off in phase 2
  logic hold = 0;
  assign ready = !hold;
  always @(posedge clk) if (rst_n) begin
    if (valid && ready) begin
      checks++;
      nrep++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected delay %0d", delay); end
      else begin
        int e; e = exp_q.pop_front();
        if (delay != 5'(e)) begin failures++; $display("delay %0d exp %0d", delay, e); end
      end
    end
    if (lost) nlost++;
  end
  initial begin
    int gap;
    pulse = 0;
    repeat (3) @(posedge clk); @(negedge clk); rst_n = 1;
    @(negedge clk); pulse = 1; @(negedge clk); pulse = 0;
    repeat (400) begin
      gap = 2 + ($urandom % 45);
      repeat (gap - 1) @(negedge clk);
      pulse = 1; if (gap < 32) exp_q.push_back(gap);
      @(negedge clk); pulse = 0;
    end
    repeat (40) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d delays not reported", exp_q.size()); end
    // lost: consumer stalls, two short gaps in a row
    hold = 1;
    @(negedge clk); pulse = 1; @(negedge clk); pulse = 0;
    repeat (4) @(negedge clk); pulse = 1; @(negedge clk); pulse = 0;  // delay 5 waits
    repeat (6) @(negedge clk); pulse = 1; @(negedge clk); pulse = 0;  // delay 7 replaces it
    exp_q.push_back(7);
    repeat (2) @(negedge clk);
    checks += 2;
    if (nlost != 1) begin failures++; $display("lost count %0d", nlost); end
    if (!valid || delay != 5'd7) begin failures++; $display("held delay %0d", delay); end
    hold = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("reported %0d delays", nrep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
