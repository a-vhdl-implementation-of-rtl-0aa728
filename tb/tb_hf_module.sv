// tb_hf_module: the HF module with its power-up sweep. The testbench sends pulse
// trains on both channels for two energy levels, keeps its own histogramme of the
// delays (energy*64 + channel*32 + delay), then pulls three 64-byte blocks out through
// the serial telemetry (request, 8 bit clocks per byte) and compares every byte.
module tb_hf_module;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pw_busy, pw_done; logic [9:0] pw_addr;
  logic ip1, ip2, estep, req, bitc, data, busy, e_o, u_o, c_o, l_o; logic [1:0] lost;
  logic [3:0] energy;
  int checks = 0, failures = 0, n_lost = 0, n_upd = 0, n_copy = 0;
  logic [7:0] ref_h [1024];
  powerup_ctrl #(.AW(10)) u_pw (.clk, .rst_n, .busy_o(pw_busy), .addr_o(pw_addr), .done_o(pw_done));
  hf_module dut (.clk, .rst_n, .pwrup_busy_i(pw_busy), .pwrup_addr_i(pw_addr),
    .ip1_rise_i(ip1), .ip2_rise_i(ip2), .estep_rise_i(estep), .last_energy_i(energy),
    .tm_req_i(req), .tm_bit_i(bitc), .tm_data_o(data), .tm_busy_o(busy),
    .estep_o(e_o), .update_o(u_o), .copy_o(c_o), .load_o(l_o), .lost_o(lost));
  always @(posedge clk) if (rst_n) begin
    n_lost += int'(lost[0]) + int'(lost[1]);
    n_upd  += int'(u_o);
    n_copy += int'(c_o);
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int cur_e;
  task automatic channel(input int c, input int n, ref logic p);
    int gap;
    @(negedge clk); p = 1; @(negedge clk); p = 0;
    repeat (n) begin
      gap = 6 + $urandom % 34;
      repeat (gap - 1) @(negedge clk);
      p = 1;
      if (gap < 32) ref_h[cur_e * 64 + c * 32 + gap]++;
      @(negedge clk); p = 0;
    end
  endtask
  task automatic get_byte(output logic [7:0] b);
    @(negedge clk); req = 1; @(negedge clk); req = 0;
    while (!l_o) @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      b = {b[6:0], data};
      bitc = 1; @(negedge clk); bitc = 0; @(negedge clk);
    end
  endtask
  initial begin
    logic [7:0] b;
    ip1 = 0; ip2 = 0; estep = 0; req = 0; bitc = 0; energy = 4'd0; cur_e = 0;
    foreach (ref_h[a]) ref_h[a] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    while (!pw_done) @(negedge clk);
    for (int e = 0; e < 2; e++) begin
      energy = 4'(e); @(negedge clk); estep = 1; @(negedge clk); estep = 0;
      @(negedge clk); @(negedge clk); cur_e = e;
      fork
        channel(0, 300, ip1);
        channel(1, 300, ip2);
      join
      repeat (40) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    for (int r = 0; r < 3 * 64; r++) begin
      get_byte(b);
      checks++;
      if (b != ref_h[r]) begin failures++; if (failures < 10) $display("byte %0d = %0d exp %0d", r, b, ref_h[r]); end
    end
    checks += 2;
    if (n_lost != 0) begin failures++; $display("lost %0d", n_lost); end
    if (n_copy != 3) begin failures++; $display("copies %0d", n_copy); end
    $display("histogramme updates %0d", n_upd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
