// pulse_delay_fsm: input state machine of one HF detector channel (FSM 1 / FSM 2).
// It measures the delay between two adjacent pulses and hands it, as a lag number, to
// the buncher histogramme generator. A lag counter advances every LAG_DIV clocks from
// the pulse on; at the next pulse the count is the delay. Delays of HF_LAGS (32) lags
// or more fall outside the buncher and are not reported. The state machine has two
// states: WAIT_FIRST (no earlier pulse since reset) and TIMING.
// Interface: pulse_i is a one-clock strobe per detector pulse (already synchronised).
// The delay is offered with a valid/ready handshake (valid_o/delay_o, ready_i); it is
// held until taken. A delay that arrives while the previous one is still waiting
// replaces it and lost_o pulses for one clock (the source design has no FIFO here).
// Timing: valid_o rises the clock after the closing pulse.
module pulse_delay_fsm #(
  parameter int unsigned LAG_W   = 5,
  parameter int unsigned LAG_DIV = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pulse_i,
  output logic             valid_o,
  output logic [LAG_W-1:0] delay_o,
  input  logic             ready_i,
  output logic             lost_o
);
  typedef enum logic {WAIT_FIRST, TIMING} state_t;
  state_t state;
  localparam int unsigned DIV_W = (LAG_DIV > 1) ? $clog2(LAG_DIV) : 1;
  logic [DIV_W-1:0] div_cnt;
  logic [LAG_W:0]   lag_cnt;      // one extra bit: saturates at 2**LAG_W (out of range)
  logic             tick;

  assign tick = (LAG_DIV <= 1) ? 1'b1 : (div_cnt == DIV_W'(LAG_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= WAIT_FIRST;
      div_cnt <= '0;
      lag_cnt <= '0;
      valid_o <= 1'b0;
      delay_o <= '0;
      lost_o  <= 1'b0;
    end else begin
      lost_o <= 1'b0;
      if (valid_o && ready_i) valid_o <= 1'b0;
      if (pulse_i) begin
        div_cnt <= '0;
        lag_cnt <= (LAG_DIV <= 1) ? (LAG_W+1)'(1) : '0;
        state   <= TIMING;
        if (state == TIMING && !lag_cnt[LAG_W]) begin
          delay_o <= lag_cnt[LAG_W-1:0];
          valid_o <= 1'b1;
          lost_o  <= valid_o && !ready_i;
        end
      end else if (state == TIMING) begin
        div_cnt <= tick ? '0 : div_cnt + 1'b1;
        if (tick && !lag_cnt[LAG_W]) lag_cnt <= lag_cnt + 1'b1;
      end
    end
  end
endmodule
