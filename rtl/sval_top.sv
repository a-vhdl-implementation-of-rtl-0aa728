// sval_top: the SVAL on-board ACF application in one FPGA. The HF module builds
// "buncher" histogrammes of the delays between adjacent detector pulses, per energy
// level, and the LF module computes a 16-lag auto-correlation function of pulse counts
// per energy step; each has its own telemetry output. Both share the two detector
// channels, the New Energy Step line, the 4 Last Energy bits and the power-up process,
// which clears the histogramme in the first 1024 clocks after reset.
// All asynchronous inputs pass through two-flop synchronisers (sync_edge); the energy
// bits and the one-bit-mode telecommand through a two-flop register. Telemetry: a
// rising edge on tm_*_req_i requests the next word (8 bits HF, 10 bits LF) and each
// rising edge of tm_*_bit_i shifts out the next bit on tm_*_data_o, MSB first.
// The *_o event outputs are one-clock flags for monitoring.
module sval_top
  import sval_pkg::*;
#(
  parameter int unsigned LAG_DIV    = 1,
  parameter int unsigned DIV_EVEN   = 400,
  parameter int unsigned DIV_ODD    = 1200,
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ip1_i,
  input  logic                ip2_i,
  input  logic                new_estep_i,
  input  logic [ENERGY_W-1:0] last_energy_i,
  input  logic                one_bit_mode_i,
  input  logic                tm_hf_req_i,
  input  logic                tm_hf_bit_i,
  output logic                tm_hf_data_o,
  input  logic                tm_lf_req_i,
  input  logic                tm_lf_bit_i,
  output logic                tm_lf_data_o,
  output logic                pwrup_done_o,
  output logic                hf_update_o,
  output logic                hf_estep_o,
  output logic                hf_copy_o,
  output logic                lf_estep_o,
  output logic                lf_stall_o,
  output logic                lf_proc_done_o,
  output logic                lf_overflow_o,
  output logic                lf_underrun_o
);
  logic                ip1_r, ip2_r, estep_r, hreq_r, hbit_r, lreq_r, lbit_r;
  logic                unused_lvl [7];
  logic [ENERGY_W-1:0] energy_s1, energy_s2;
  logic                onebit_s1, onebit_s2;
  logic                pwrup_busy;
  logic [HIST_AW-1:0]  pwrup_addr;
  logic                hf_busy, hf_load, lf_busy, lf_out_done, lf_load;
  logic [1:0]          hf_lost;

  sync_edge u_s_ip1   (.clk, .rst_n, .async_i(ip1_i),       .level_o(unused_lvl[0]), .rise_o(ip1_r));
  sync_edge u_s_ip2   (.clk, .rst_n, .async_i(ip2_i),       .level_o(unused_lvl[1]), .rise_o(ip2_r));
  sync_edge u_s_estep (.clk, .rst_n, .async_i(new_estep_i), .level_o(unused_lvl[2]), .rise_o(estep_r));
  sync_edge u_s_hreq  (.clk, .rst_n, .async_i(tm_hf_req_i), .level_o(unused_lvl[3]), .rise_o(hreq_r));
  sync_edge u_s_hbit  (.clk, .rst_n, .async_i(tm_hf_bit_i), .level_o(unused_lvl[4]), .rise_o(hbit_r));
  sync_edge u_s_lreq  (.clk, .rst_n, .async_i(tm_lf_req_i), .level_o(unused_lvl[5]), .rise_o(lreq_r));
  sync_edge u_s_lbit  (.clk, .rst_n, .async_i(tm_lf_bit_i), .level_o(unused_lvl[6]), .rise_o(lbit_r));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      energy_s1 <= '0; energy_s2 <= '0; onebit_s1 <= 1'b0; onebit_s2 <= 1'b0;
    end else begin
      energy_s1 <= last_energy_i;  energy_s2 <= energy_s1;
      onebit_s1 <= one_bit_mode_i; onebit_s2 <= onebit_s1;
    end
  end

  powerup_ctrl #(.AW(HIST_AW)) u_pwrup (
    .clk, .rst_n, .busy_o(pwrup_busy), .addr_o(pwrup_addr), .done_o(pwrup_done_o));

  hf_module #(.LAG_DIV(LAG_DIV)) u_hf (
    .clk, .rst_n, .pwrup_busy_i(pwrup_busy), .pwrup_addr_i(pwrup_addr),
    .ip1_rise_i(ip1_r), .ip2_rise_i(ip2_r), .estep_rise_i(estep_r),
    .last_energy_i(energy_s2), .tm_req_i(hreq_r), .tm_bit_i(hbit_r),
    .tm_data_o(tm_hf_data_o), .tm_busy_o(hf_busy), .estep_o(hf_estep_o),
    .update_o(hf_update_o), .copy_o(hf_copy_o), .load_o(hf_load), .lost_o(hf_lost));

  lf_module #(.DIV_EVEN(DIV_EVEN), .DIV_ODD(DIV_ODD), .FIFO_DEPTH(FIFO_DEPTH)) u_lf (
    .clk, .rst_n, .pwrup_done_i(pwrup_done_o), .ip1_rise_i(ip1_r), .ip2_rise_i(ip2_r),
    .estep_rise_i(estep_r), .last_energy_i(energy_s2), .one_bit_i(onebit_s2),
    .tm_req_i(lreq_r), .tm_bit_i(lbit_r), .tm_data_o(tm_lf_data_o), .tm_busy_o(lf_busy),
    .estep_o(lf_estep_o), .stall_o(lf_stall_o), .proc_done_o(lf_proc_done_o),
    .out_done_o(lf_out_done), .overflow_o(lf_overflow_o), .underrun_o(lf_underrun_o),
    .load_o(lf_load));
endmodule
