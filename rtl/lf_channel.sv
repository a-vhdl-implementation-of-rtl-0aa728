// lf_channel: one LF ACF channel (ACF1 for I/P1 or ACF2 for I/P2): the sampling
// process writing M3 (32x8, samples being taken), the copy process moving M3 into M2
// (32x8, samples ready for processing), the ACF processor reading M2 and writing the
// 16 sums into M1 (16x16, ACF sum values), and a read port on M1 for the scaling and
// output process. All three arrays are single-ported; each is given to one process at
// a time: M3 to the sampler while it runs, else to the copy; M2 to the copy while it
// runs, else to the processor; M1 to the processor while it runs, else to the reader.
// The control (lf_ctrl) keeps the processes apart as the source's synch points do;
// assertions check it. m1_rdata_o follows m1_raddr_i by one clock.
module lf_channel #(
  parameter int unsigned DIV_EVEN = 400,
  parameter int unsigned DIV_ODD  = 1200
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pulse_i,
  input  logic        sample_start_i,
  input  logic        odd_i,
  input  logic        copy_start_i,
  input  logic        proc_start_i,
  input  logic        one_bit_i,
  input  logic [3:0]  m1_raddr_i,
  output logic [15:0] m1_rdata_o,
  output logic        sample_busy_o,
  output logic        sample_done_o,
  output logic        copy_busy_o,
  output logic        copy_done_o,
  output logic        proc_busy_o,
  output logic        proc_done_o
);
  localparam int unsigned N = 32;
  logic       s_we;
  logic [4:0] s_addr, c_src_addr, c_dst_addr, p_m2_addr, m3_addr, m2_addr;
  logic [7:0] s_wdata, m3_rdata, c_wdata, m2_rdata;
  logic       c_we, p_m1_we;
  logic [3:0] p_m1_addr, m1_addr;
  logic [15:0] p_m1_wdata;

  lf_sampler #(.DIV_EVEN(DIV_EVEN), .DIV_ODD(DIV_ODD), .N(N)) u_samp (
    .clk, .rst_n, .start_i(sample_start_i), .odd_i, .pulse_i,
    .m_we_o(s_we), .m_addr_o(s_addr), .m_wdata_o(s_wdata),
    .busy_o(sample_busy_o), .done_o(sample_done_o));

  assign m3_addr = sample_busy_o ? s_addr : c_src_addr;
  sp_ram #(.DW(8), .AW(5)) u_m3 (
    .clk, .addr(m3_addr), .we(s_we), .wdata(s_wdata), .rdata(m3_rdata));

  lf_copy #(.N(N)) u_copy (
    .clk, .rst_n, .start_i(copy_start_i), .src_addr_o(c_src_addr), .src_rdata_i(m3_rdata),
    .dst_we_o(c_we), .dst_addr_o(c_dst_addr), .dst_wdata_o(c_wdata),
    .busy_o(copy_busy_o), .done_o(copy_done_o));

  assign m2_addr = copy_busy_o ? c_dst_addr : p_m2_addr;
  sp_ram #(.DW(8), .AW(5)) u_m2 (
    .clk, .addr(m2_addr), .we(c_we), .wdata(c_wdata), .rdata(m2_rdata));

  lf_acf_proc #(.N(N)) u_proc (
    .clk, .rst_n, .start_i(proc_start_i), .one_bit_i,
    .pre_we_i(c_we), .pre_addr_i(c_dst_addr), .pre_data_i(c_wdata),
    .m2_addr_o(p_m2_addr), .m2_rdata_i(m2_rdata),
    .m1_we_o(p_m1_we), .m1_addr_o(p_m1_addr), .m1_wdata_o(p_m1_wdata),
    .busy_o(proc_busy_o), .done_o(proc_done_o));

  assign m1_addr = proc_busy_o ? p_m1_addr : m1_raddr_i;
  sp_ram #(.DW(16), .AW(4)) u_m1 (
    .clk, .addr(m1_addr), .we(p_m1_we), .wdata(p_m1_wdata), .rdata(m1_rdata_o));

  // the source's synch points 2 and 3: copy only after sampling, processing after copy
  a_copy_not_during_sampling: assert property (@(posedge clk) disable iff (!rst_n)
    !(copy_busy_o && sample_busy_o));
  a_proc_not_during_copy: assert property (@(posedge clk) disable iff (!rst_n)
    !(copy_busy_o && proc_busy_o));
endmodule
