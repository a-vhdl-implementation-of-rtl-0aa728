// hf_module: the HF ("buncher") part of the design. Two input state machines measure
// the delay between adjacent pulses on I/P1 and I/P2; the buncher histogramme
// generator counts each delay into the 1Kx8 dual-port histogramme at the block of the
// current energy level; the Next O/P process copies 64-byte blocks into the 64x8
// output array and, on each telemetry request, hands one byte to the parallel-to-serial
// converter. The structure follows the HF process/memory diagram of the source design;
// the inputs here are already synchronised one-clock strobes (see sval_top).
// Timing: a histogramme update takes 2 clocks, a New Energy Step is taken in 1 clock,
// a telemetry byte request is answered in 1 clock or, with a block copy, 68 clocks.
module hf_module
  import sval_pkg::*;
#(
  parameter int unsigned LAG_DIV = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                pwrup_busy_i,
  input  logic [HIST_AW-1:0]  pwrup_addr_i,
  input  logic                ip1_rise_i,
  input  logic                ip2_rise_i,
  input  logic                estep_rise_i,
  input  logic [ENERGY_W-1:0] last_energy_i,
  input  logic                tm_req_i,
  input  logic                tm_bit_i,
  output logic                tm_data_o,
  output logic                tm_busy_o,
  // event flags, for monitoring
  output logic                estep_o,
  output logic                update_o,
  output logic                copy_o,
  output logic                load_o,
  output logic [1:0]          lost_o
);
  logic [1:0]          d_valid, d_ready;
  logic [HF_LAG_W-1:0] d_delay [2];
  logic [HIST_AW-1:0]  a_addr, b_addr, base;
  logic                a_we;
  logic [7:0]          a_wdata, a_rdata, b_rdata;
  logic [5:0]          o_addr;
  logic                o_we;
  logic [7:0]          o_wdata, o_rdata, tm_byte;
  logic [ENERGY_W-1:0] out_block;

  pulse_delay_fsm #(.LAG_W(HF_LAG_W), .LAG_DIV(LAG_DIV)) u_fsm1 (
    .clk, .rst_n, .pulse_i(ip1_rise_i), .valid_o(d_valid[0]), .delay_o(d_delay[0]),
    .ready_i(d_ready[0]), .lost_o(lost_o[0]));
  pulse_delay_fsm #(.LAG_W(HF_LAG_W), .LAG_DIV(LAG_DIV)) u_fsm2 (
    .clk, .rst_n, .pulse_i(ip2_rise_i), .valid_o(d_valid[1]), .delay_o(d_delay[1]),
    .ready_i(d_ready[1]), .lost_o(lost_o[1]));

  buncher_hist_gen u_bhg (
    .clk, .rst_n, .pwrup_busy_i, .clr_addr_i(pwrup_addr_i), .last_energy_i,
    .estep_rise_i, .d_valid_i(d_valid), .d_delay_i(d_delay), .d_ready_o(d_ready),
    .ram_addr_o(a_addr), .ram_we_o(a_we), .ram_wdata_o(a_wdata), .ram_rdata_i(a_rdata),
    .base_o(base), .estep_o, .update_o);

  dp_ram #(.DW(8), .AW(HIST_AW)) u_hist (
    .clk, .a_addr, .a_we, .a_wdata, .a_rdata, .b_addr, .b_rdata);

  hf_output u_out (
    .clk, .rst_n, .enable_i(!pwrup_busy_i), .tm_req_i,
    .h_addr_o(b_addr), .h_rdata_i(b_rdata),
    .o_addr_o(o_addr), .o_we_o(o_we), .o_wdata_o(o_wdata), .o_rdata_i(o_rdata),
    .load_o, .byte_o(tm_byte), .copy_o, .block_o(out_block));

  sp_ram #(.DW(8), .AW(6)) u_oarray (
    .clk, .addr(o_addr), .we(o_we), .wdata(o_wdata), .rdata(o_rdata));

  tm_serializer #(.W(8)) u_ser (
    .clk, .rst_n, .load_i(load_o), .word_i(tm_byte), .bit_i(tm_bit_i),
    .data_o(tm_data_o), .busy_o(tm_busy_o));
endmodule
