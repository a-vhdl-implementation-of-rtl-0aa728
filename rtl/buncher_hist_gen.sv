// buncher_hist_gen: Buncher Histogramme Generator of the HF module, together with the
// New Energy Step monitoring.
// The 1Kx8 histogramme holds 16 blocks of 64 bytes, one per energy level. The block
// base is {Last Energy, 6'b0}; it is loaded during power-up and again on each rising
// edge of New Energy Step (one clock). Within a block, this design gives bytes 0..31 to
// input channel I/P1 and bytes 32..63 to I/P2, indexed by the delay (lag) reported by
// that channel's state machine, so bin address = base | {channel, delay}.
// An update takes two clocks, as in the source design: clock 1 presents the bin
// address to RAM port A (read); clock 2 writes the read value plus one (8-bit wrap,
// as the source's "+ 1"). The two channels are served alternately; an idle channel
// gives its turn to the other. While pwrup_busy_i is high the generator writes zero to
// clr_addr_i instead, clearing the histogramme.
// Interface: delays arrive on d_valid_i/d_delay_i with d_ready_o taken in the read
// clock. estep_rise_i is the synchronised edge strobe; an edge that comes during a
// write clock is kept and served next. estep_o and update_o are one-clock event flags.
module buncher_hist_gen
  import sval_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                pwrup_busy_i,
  input  logic [HIST_AW-1:0]  clr_addr_i,
  input  logic [ENERGY_W-1:0] last_energy_i,
  input  logic                estep_rise_i,
  input  logic [1:0]          d_valid_i,
  input  logic [HF_LAG_W-1:0] d_delay_i [2],
  output logic [1:0]          d_ready_o,
  output logic [HIST_AW-1:0]  ram_addr_o,
  output logic                ram_we_o,
  output logic [7:0]          ram_wdata_o,
  input  logic [7:0]          ram_rdata_i,
  output logic [HIST_AW-1:0]  base_o,
  output logic                estep_o,
  output logic                update_o
);
  typedef enum logic {RD, WR} phase_t;
  phase_t             phase;
  logic               which_ip;      // channel with priority next
  logic               estep_pend;
  logic [HIST_AW-1:0] addr_q;
  logic               sel;
  logic               any_valid;
  logic               serve_estep;

  always_comb begin
    sel         = d_valid_i[which_ip] ? which_ip : !which_ip;
    any_valid   = |d_valid_i;
    serve_estep = estep_pend | estep_rise_i;
    ram_addr_o  = addr_q;
    ram_we_o    = 1'b0;
    ram_wdata_o = ram_rdata_i + 8'd1;
    d_ready_o   = 2'b00;
    if (pwrup_busy_i) begin
      ram_addr_o  = clr_addr_i;
      ram_we_o    = 1'b1;
      ram_wdata_o = 8'd0;
    end else if (phase == WR) begin
      ram_we_o    = 1'b1;
    end else if (!serve_estep && any_valid) begin
      ram_addr_o     = base_o | HIST_AW'({sel, d_delay_i[sel]});
      d_ready_o[sel] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= RD;
      which_ip   <= 1'b0;
      estep_pend <= 1'b0;
      addr_q     <= '0;
      base_o     <= '0;
      estep_o    <= 1'b0;
      update_o   <= 1'b0;
    end else begin
      estep_o  <= 1'b0;
      update_o <= 1'b0;
      if (pwrup_busy_i) begin
        base_o     <= {last_energy_i, 6'b0};
        phase      <= RD;
        estep_pend <= 1'b0;
      end else if (phase == WR) begin
        phase    <= RD;
        update_o <= 1'b1;
        if (estep_rise_i) estep_pend <= 1'b1;
      end else if (serve_estep) begin
        base_o     <= {last_energy_i, 6'b0};
        estep_pend <= 1'b0;
        estep_o    <= 1'b1;
      end else if (any_valid) begin
        addr_q   <= ram_addr_o;
        phase    <= WR;
        which_ip <= !sel;
      end
    end
  end
endmodule
