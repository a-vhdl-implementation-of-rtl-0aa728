// tb_buncher_hist_gen: the histogramme generator with a 1Kx8 dual-port RAM. After a
// power-up clear of the whole RAM, random delays are offered on both channels while
// the energy level changes through New Energy Step edges. A reference histogramme is
// kept by the testbench (bin = energy*64 + channel*32 + delay, +1 mod 256); at the end
// every byte is read through port B and compared. Also checks that an update takes two
// clocks (ready to write) and that an energy step is taken in one clock.
module tb_buncher_hist_gen;
  import sval_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pwrup_busy; logic [9:0] clr_addr; logic [3:0] energy; logic estep;
  logic [1:0] d_valid, d_ready; logic [4:0] d_delay [2];
  logic [9:0] a_addr, b_addr, base; logic a_we; logic [7:0] a_wdata, a_rdata, b_rdata;
  logic estep_o, update_o;
  int checks = 0, failures = 0, n_upd = 0, n_estep = 0;
  logic [7:0] ref_h [1024];
  int cur_energy;
  logic run = 0;
  logic [1:0] taken = 0;
  buncher_hist_gen dut (.clk, .rst_n, .pwrup_busy_i(pwrup_busy), .clr_addr_i(clr_addr),
    .last_energy_i(energy), .estep_rise_i(estep), .d_valid_i(d_valid), .d_delay_i(d_delay),
    .d_ready_o(d_ready), .ram_addr_o(a_addr), .ram_we_o(a_we), .ram_wdata_o(a_wdata),
    .ram_rdata_i(a_rdata), .base_o(base), .estep_o, .update_o);
  dp_ram #(.DW(8), .AW(10)) u_ram (.clk, .a_addr, .a_we, .a_wdata, .a_rdata, .b_addr, .b_rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // producers: each channel offers a random delay, holds it until ready
  for (genvar c = 0; c < 2; c++) begin : g_p
    always @(negedge clk) if (rst_n && !pwrup_busy && run) begin
      if (!d_valid[c] || taken[c]) begin
        d_valid[c] = ($urandom % 3) != 0;
        d_delay[c] = 5'($urandom);
      end
      taken[c] = 1'b0;
    end
  end
  int wr_due = -1, cyc = 0;
  logic [9:0] pend_bin;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && !pwrup_busy) begin
      for (int c = 0; c < 2; c++) if (d_valid[c] && d_ready[c]) begin
        pend_bin = 10'(cur_energy * 64 + c * 32 + d_delay[c]);
        ref_h[pend_bin] = ref_h[pend_bin] + 8'd1;
        taken[c] = 1'b1;
        wr_due = cyc + 1;
        checks++;
        if (a_addr != pend_bin) begin failures++; $display("bin %0d exp %0d", a_addr, pend_bin); end
      end
      if (a_we) begin
        checks++;
        if (cyc != wr_due || a_addr != pend_bin) begin failures++; $display("write timing cyc %0d due %0d", cyc, wr_due); end
      end
      if (update_o) n_upd++;
    end
  end
  initial begin
    d_valid = 0; d_delay[0] = 0; d_delay[1] = 0; estep = 0; energy = 4'd3; cur_energy = 3;
    pwrup_busy = 1; clr_addr = 0; b_addr = 0;
    for (int a = 0; a < 1024; a++) ref_h[a] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 1024; a++) begin clr_addr = 10'(a); @(negedge clk); end
    pwrup_busy = 0;
    @(negedge clk);
    checks++; if (base != 10'(3 * 64)) begin failures++; $display("power-up base %0d", base); end
    run = 1;
    for (int s = 0; s < 12; s++) begin
      repeat (150 + $urandom % 100) @(negedge clk);
      // energy step: new energy, then an edge; the testbench's energy follows when taken
      energy = 4'($urandom);
      estep = 1;
      @(negedge clk); estep = 0;
      // the step is taken within 2 clocks (1 if no write is in flight)
      while (!estep_o) begin @(negedge clk); end
      cur_energy = energy;
      n_estep++;
      checks++;
      if (base != {energy, 6'b0}) begin failures++; $display("base %0d after step", base); end
    end
    run = 0; d_valid = 0;
    repeat (5) @(negedge clk);
    for (int a = 0; a < 1024; a++) begin
      b_addr = 10'(a); @(negedge clk);
      checks++;
      if (b_rdata != ref_h[a]) begin failures++; if (failures < 10) $display("hist[%0d]=%0d exp %0d", a, b_rdata, ref_h[a]); end
    end
    $display("updates %0d, energy steps %0d", n_upd, n_estep);
    checks++; if (n_upd < 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
