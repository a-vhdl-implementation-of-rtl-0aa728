// lf_ctrl: the LF "New energy step" process and the synchronisation of the LF processes.
// On each New Energy Step (rising edge, after power-up has finished) it runs, in the
// source's order:
//   i.   output of the ACF sums computed during the last step (scaling & O/P -> FIFO),
//   ii.  copy of the series sampled in the last step from M3 to M2,
//   iii. start of the ACF processing of M2 (synch point 3: after the copy) and, in the
//        same clock, start of sampling for the new step (synch point 1: after the step;
//        M3 is free once copied).
// Synch point 2 (the copy waits for the end of sampling): if the step arrives while
// the previous sampling run is still going, the sequence waits in WAIT_SAMP until it
// ends, and also until the processor is idle, since M1 is about to be read; stall_o is
// high while it waits. Items i and ii are skipped when there is nothing to output or
// copy (the first steps after power-up). The mode telecommand one_bit_i is taken when
// processing starts and travels with the results to the output stage. The energy
// parity selects the sampling interval. A step that arrives mid-sequence is kept and
// served when the sequence ends.
module lf_ctrl
  import sval_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                pwrup_done_i,
  input  logic                estep_rise_i,
  input  logic [ENERGY_W-1:0] last_energy_i,
  input  logic                one_bit_i,
  input  logic                samp_busy_i,
  input  logic                samp_done_i,
  input  logic                copy_done_i,
  input  logic                proc_busy_i,
  input  logic                out_done_i,
  output logic                sample_start_o,
  output logic                odd_o,
  output logic                copy_start_o,
  output logic                proc_start_o,
  output logic                proc_one_bit_o,
  output logic                out_start_o,
  output logic                out_one_bit_o,
  output logic                estep_o,
  output logic                stall_o
);
  typedef enum logic [2:0] {WAIT_STEP, WAIT_SAMP, OUT, WAIT_OUT, COPY, WAIT_COPY, START}
    state_t;
  state_t              state;
  logic                pend, res_valid, ser_valid, do_proc;
  logic [ENERGY_W-1:0] energy;

  assign stall_o = (state == WAIT_SAMP) && (samp_busy_i || proc_busy_i);
  assign odd_o   = energy[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= WAIT_STEP;
      pend           <= 1'b0;
      res_valid      <= 1'b0;
      ser_valid      <= 1'b0;
      do_proc        <= 1'b0;
      energy         <= '0;
      sample_start_o <= 1'b0;
      copy_start_o   <= 1'b0;
      proc_start_o   <= 1'b0;
      proc_one_bit_o <= 1'b0;
      out_start_o    <= 1'b0;
      out_one_bit_o  <= 1'b0;
      estep_o        <= 1'b0;
    end else begin
      sample_start_o <= 1'b0;
      copy_start_o   <= 1'b0;
      proc_start_o   <= 1'b0;
      out_start_o    <= 1'b0;
      estep_o        <= 1'b0;
      if (estep_rise_i && pwrup_done_i) pend <= 1'b1;
      if (samp_done_i) ser_valid <= 1'b1;
      unique case (state)
        WAIT_STEP: if (pwrup_done_i && (pend || estep_rise_i)) begin
          pend    <= 1'b0;
          energy  <= last_energy_i;
          estep_o <= 1'b1;
          state   <= WAIT_SAMP;
        end
        WAIT_SAMP: if (!samp_busy_i && !proc_busy_i && !samp_done_i) state <= OUT;
        OUT: if (res_valid) begin
          out_start_o <= 1'b1;
          state       <= WAIT_OUT;
        end else begin
          state <= COPY;
        end
        WAIT_OUT: if (out_done_i) begin
          res_valid <= 1'b0;
          state     <= COPY;
        end
        COPY: begin
          do_proc <= ser_valid;
          if (ser_valid) begin
            copy_start_o <= 1'b1;
            ser_valid    <= 1'b0;
            state        <= WAIT_COPY;
          end else begin
            state <= START;
          end
        end
        WAIT_COPY: if (copy_done_i) state <= START;
        START: begin
          sample_start_o <= 1'b1;
          if (do_proc) begin
            proc_start_o   <= 1'b1;
            proc_one_bit_o <= one_bit_i;
            out_one_bit_o  <= one_bit_i;
            res_valid      <= 1'b1;
          end
          state <= WAIT_STEP;
        end
        default: state <= WAIT_STEP;
      endcase
    end
  end
endmodule
