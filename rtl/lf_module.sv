// lf_module: the LF ("real" ACF) part of the design. Two ACF channels (I/P1 -> ACF1,
// I/P2 -> ACF2) each sample 32 pulse counts per energy step, copy them to a processing
// array and compute a 16-lag ACF; on the next energy step the scaling & O/P process
// compresses the 2 x 16 sums to 10-bit words and writes them to the 512x10 circular
// FIFO, from which the Next O/P process feeds the LF telemetry serialiser, one word
// per telemetry request. lf_ctrl sequences the processes per energy step. Inputs are
// synchronised one-clock strobes and levels (see sval_top).
// Parameters: DIV_EVEN / DIV_ODD are the sampling intervals in clocks for even and odd
// energy levels, FIFO_DEPTH the FIFO size.
module lf_module
  import sval_pkg::*;
#(
  parameter int unsigned DIV_EVEN   = 400,
  parameter int unsigned DIV_ODD    = 1200,
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                pwrup_done_i,
  input  logic                ip1_rise_i,
  input  logic                ip2_rise_i,
  input  logic                estep_rise_i,
  input  logic [ENERGY_W-1:0] last_energy_i,
  input  logic                one_bit_i,
  input  logic                tm_req_i,
  input  logic                tm_bit_i,
  output logic                tm_data_o,
  output logic                tm_busy_o,
  // event flags, for monitoring
  output logic                estep_o,
  output logic                stall_o,
  output logic                proc_done_o,
  output logic                out_done_o,
  output logic                overflow_o,
  output logic                underrun_o,
  output logic                load_o
);
  logic        samp_start, odd, copy_start, proc_start, proc_one_bit, out_start, out_one_bit;
  logic [1:0]  s_busy, s_done, c_busy, c_done, p_busy, p_done;
  logic [3:0]  m1_raddr;
  logic [15:0] m1_rdata [2];
  logic        push, pop, rvalid, full, empty, out_busy;
  logic [LF_OUT_W-1:0] push_data, pop_data, tm_word;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;
  logic [1:0]  pulses;

  assign pulses = {ip2_rise_i, ip1_rise_i};

  lf_ctrl u_ctrl (
    .clk, .rst_n, .pwrup_done_i, .estep_rise_i, .last_energy_i, .one_bit_i,
    .samp_busy_i(|s_busy), .samp_done_i(s_done[0]), .copy_done_i(c_done[0]),
    .proc_busy_i(|p_busy), .out_done_i(out_done_o),
    .sample_start_o(samp_start), .odd_o(odd), .copy_start_o(copy_start),
    .proc_start_o(proc_start), .proc_one_bit_o(proc_one_bit), .out_start_o(out_start),
    .out_one_bit_o(out_one_bit), .estep_o, .stall_o);

  for (genvar c = 0; c < 2; c++) begin : g_ch
    lf_channel #(.DIV_EVEN(DIV_EVEN), .DIV_ODD(DIV_ODD)) u_ch (
      .clk, .rst_n, .pulse_i(pulses[c]), .sample_start_i(samp_start), .odd_i(odd),
      .copy_start_i(copy_start), .proc_start_i(proc_start), .one_bit_i(proc_one_bit),
      .m1_raddr_i(m1_raddr), .m1_rdata_o(m1_rdata[c]),
      .sample_busy_o(s_busy[c]), .sample_done_o(s_done[c]),
      .copy_busy_o(c_busy[c]), .copy_done_o(c_done[c]),
      .proc_busy_o(p_busy[c]), .proc_done_o(p_done[c]));
  end
  assign proc_done_o = p_done[0];

  lf_scale_out u_scale (
    .clk, .rst_n, .start_i(out_start), .one_bit_i(out_one_bit),
    .m1_raddr_o(m1_raddr), .m1_rdata_i(m1_rdata), .push_o(push), .wdata_o(push_data),
    .busy_o(out_busy), .done_o(out_done_o));

  circ_fifo #(.DW(LF_OUT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push_i(push), .wdata_i(push_data), .pop_i(pop), .rdata_o(pop_data),
    .rvalid_o(rvalid), .full_o(full), .empty_o(empty), .count_o(fifo_count),
    .overflow_o);

  lf_tm_output u_next (
    .clk, .rst_n, .tm_req_i, .fifo_empty_i(empty), .fifo_pop_o(pop),
    .fifo_rdata_i(pop_data), .fifo_rvalid_i(rvalid), .load_o, .word_o(tm_word),
    .underrun_o);

  tm_serializer #(.W(LF_OUT_W)) u_ser (
    .clk, .rst_n, .load_i(load_o), .word_i(tm_word), .bit_i(tm_bit_i),
    .data_o(tm_data_o), .busy_o(tm_busy_o));

  // both channels are started together and run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    s_busy[0] == s_busy[1] && c_busy[0] == c_busy[1] && p_busy[0] == p_busy[1]);
endmodule
