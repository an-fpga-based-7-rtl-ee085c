// align_cal - centres the comparator pulse in the delay line.
//
// With a DC input chosen so that the pulse edges are symmetric about the
// slope peak, the comparator pulse must sit around the middle of the delay
// line: then both edges fall in the same clock period, in the right order,
// and clear of the chain ends where the edge detector cannot see them. The
// input delay of the comparator output (an IDELAYE3 tap value) is stepped
// until this holds.
//
// Sequence after start_i: wait SETTLE cycles for the datapath to reflect
// the current delay, average 2^AVG_LOG2 samples of (fall_pos + rise_pos)/2,
// the pulse centre. If the centre lies more than TOL taps above MID, the
// delay is increased (a later comparator edge has travelled fewer taps at the
// sampling instant); if it lies more than TOL below, the delay is decreased.
// The two edges must also come from the same pulse: when in most samples the
// first 1->0 edge lies below the first 0->1 edge, the chain starts inside the
// next period's pulse, and the delay is increased until that pulse has left
// the chain start, whatever the centre says.
// Each change is a dly_load_o pulse with the new value on dly_o. The loop
// ends with done_o when the centre is within MID +/- TOL, or with fail_o as
// well when the delay range is exhausted or no valid sample arrives for
// TIMEOUT cycles.
//
// Origin: centring the pulse in the chain with the input delay follows the
// published design; the step rule, the edge-order rule, TOL, the averaging and
// the timeout are this design's own.
module align_cal #(
  parameter int unsigned POS_W    = adc_pkg::POS_W,
  parameter int unsigned MID      = adc_pkg::N_TAPS / 2,
  parameter int unsigned TOL      = 4,
  parameter int unsigned DLY_W    = adc_pkg::DLY_W,
  parameter int unsigned AVG_LOG2 = 4,
  parameter int unsigned SETTLE   = 40,
  parameter int unsigned TIMEOUT  = 4096
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start_i,
  output logic              busy_o,
  output logic              done_o,
  output logic              fail_o,
  input  logic              valid_i,
  input  logic [POS_W-1:0]  fall_pos_i,
  input  logic [POS_W-1:0]  rise_pos_i,
  output logic [DLY_W-1:0]  dly_o,
  output logic              dly_load_o
);

  localparam int unsigned AW = POS_W + 1 + AVG_LOG2;
  localparam int unsigned TW = $clog2(TIMEOUT + 1) + 1;

  typedef enum logic [1:0] {S_IDLE, S_SETTLE, S_ACC, S_DECIDE} state_e;

  state_e              state;
  logic [AW-1:0]       acc;
  logic [AVG_LOG2:0]   nacc;
  logic [TW-1:0]       cnt;
  logic [AVG_LOG2:0]   n_wrong;  // samples with the edges in the wrong order

  logic [POS_W:0]      centre;   // pulse centre, one fractional bit dropped
  assign centre = (POS_W+1)'(acc >> (AVG_LOG2 + 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      acc        <= '0;
      nacc       <= '0;
      n_wrong    <= '0;
      cnt        <= '0;
      dly_o      <= DLY_W'(1 << (DLY_W - 1));
      dly_load_o <= 1'b0;
      done_o     <= 1'b0;
      fail_o     <= 1'b0;
    end else begin
      dly_load_o <= 1'b0;
      done_o     <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start_i) begin
            fail_o <= 1'b0;
            cnt    <= '0;
            state  <= S_SETTLE;
          end
        end
        S_SETTLE: begin
          cnt <= cnt + 1'b1;
          if (cnt == TW'(SETTLE)) begin
            acc     <= '0;
            nacc    <= '0;
            n_wrong <= '0;
            cnt     <= '0;
            state   <= S_ACC;
          end
        end
        S_ACC: begin
          cnt <= cnt + 1'b1;
          if (valid_i) begin
            acc  <= acc + AW'(fall_pos_i) + AW'(rise_pos_i);
            nacc <= nacc + 1'b1;
            if (rise_pos_i < fall_pos_i) n_wrong <= n_wrong + 1'b1;
            if (nacc == (AVG_LOG2+1)'((1 << AVG_LOG2) - 1)) state <= S_DECIDE;
          end else if (cnt == TW'(TIMEOUT)) begin
            fail_o <= 1'b1;
            done_o <= 1'b1;
            state  <= S_IDLE;
          end
        end
        S_DECIDE: begin
          cnt   <= '0;
          state <= S_SETTLE;
          if (n_wrong > (AVG_LOG2+1)'(1 << (AVG_LOG2 - 1)) ||
              centre > (POS_W+1)'(MID + TOL)) begin
            if (dly_o == '1) begin
              fail_o <= 1'b1;
              done_o <= 1'b1;
              state  <= S_IDLE;
            end else begin
              dly_o      <= dly_o + 1'b1;
              dly_load_o <= 1'b1;
            end
          end else if (centre + (POS_W+1)'(TOL) < (POS_W+1)'(MID)) begin
            if (dly_o == '0) begin
              fail_o <= 1'b1;
              done_o <= 1'b1;
              state  <= S_IDLE;
            end else begin
              dly_o      <= dly_o - 1'b1;
              dly_load_o <= 1'b1;
            end
          end else begin
            done_o <= 1'b1;
            state  <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state != S_IDLE);

endmodule
