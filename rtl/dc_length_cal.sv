// dc_length_cal - measures the length of a delay line in taps.
//
// The delay through the carry chain drifts with temperature and voltage, so
// the number of taps that one sampling period spans has to be measured. A
// clock with the sampling period and 50 % duty cycle, phase-shifted step by
// step, is fed into the delay line instead of the comparator output
// (sel_clk_o high). For every phase the ones in the captured pattern are
// counted. The delay line is built longer than one period, so at some phases
// the high phase appears twice and the count is too high; at the phases where
// it appears once the count is half a period. The length of one period is
// therefore twice the minimum count over all phases.
//
// Sequence after start_i: for each of N_PHASES phase steps wait SETTLE
// cycles (capture pipeline), add up 2^AVG_LOG2 popcounts, keep the smallest
// average, then request one phase step of the clock manager (ps_en_o pulse)
// and wait for ps_done_i. After N_PHASES steps the phase has made a full turn
// and len_o = 2 * minimum; done_o pulses.
// Interface: taps_i is the captured pattern of one chain.
//
// Origin: the phase-shifted clock and the doubled minimum follow the published
// design; the phase-step handshake, N_PHASES, SETTLE, AVG_LOG2 and measuring on
// one chain are this design's own. len_o[0] is always 0 (twice a count).
module dc_length_cal #(
  parameter int unsigned N_TAPS   = adc_pkg::N_TAPS,
  parameter int unsigned N_PHASES = adc_pkg::N_PHASES,
  parameter int unsigned AVG_LOG2 = 2,
  parameter int unsigned SETTLE   = 8,
  // derived
  parameter int unsigned CW       = $clog2(N_TAPS + 1),
  parameter int unsigned LW       = CW + 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start_i,
  output logic              busy_o,
  output logic              done_o,
  output logic              sel_clk_o,
  output logic              ps_en_o,
  input  logic              ps_done_i,
  input  logic [N_TAPS-1:0] taps_i,
  output logic [LW-1:0]     len_o
);

  localparam int unsigned PW = $clog2(N_PHASES + 1);
  localparam int unsigned SW = $clog2(SETTLE + 1) + 1;

  typedef enum logic [2:0] {S_IDLE, S_SETTLE, S_ACC, S_PS, S_PSWAIT} state_e;

  state_e                   state;
  logic [CW-1:0]            ones_q;          // registered popcount
  logic [CW+AVG_LOG2-1:0]   acc;
  logic [AVG_LOG2:0]        nacc;
  logic [CW-1:0]            min_q;
  logic [PW-1:0]            phase;
  logic [SW-1:0]            wait_cnt;

  always_ff @(posedge clk) begin
    ones_q <= CW'($countones(taps_i));
  end

  logic [CW-1:0] avg;
  assign avg = CW'(acc >> AVG_LOG2);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      acc      <= '0;
      nacc     <= '0;
      min_q    <= '1;
      phase    <= '0;
      wait_cnt <= '0;
      len_o    <= '0;
      done_o   <= 1'b0;
      ps_en_o  <= 1'b0;
    end else begin
      done_o  <= 1'b0;
      ps_en_o <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start_i) begin
            min_q    <= '1;
            phase    <= '0;
            wait_cnt <= '0;
            state    <= S_SETTLE;
          end
        end
        S_SETTLE: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == SW'(SETTLE)) begin
            acc   <= '0;
            nacc  <= '0;
            state <= S_ACC;
          end
        end
        S_ACC: begin
          if (nacc == (AVG_LOG2+1)'(1 << AVG_LOG2)) begin
            if (avg < min_q) min_q <= avg;
            state <= S_PS;
          end else begin
            acc  <= acc + (CW+AVG_LOG2)'(ones_q);
            nacc <= nacc + 1'b1;
          end
        end
        S_PS: begin
          ps_en_o <= 1'b1;
          state   <= S_PSWAIT;
        end
        S_PSWAIT: begin
          if (ps_done_i) begin
            phase    <= phase + 1'b1;
            wait_cnt <= '0;
            if (phase == PW'(N_PHASES - 1)) begin
              len_o  <= {min_q, 1'b0};
              done_o <= 1'b1;
              state  <= S_IDLE;
            end else begin
              state <= S_SETTLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy_o    = (state != S_IDLE);
  assign sel_clk_o = busy_o;

endmodule
