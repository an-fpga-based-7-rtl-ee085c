// adc_control - calibration sequencer of the ADC.
//
// Three calibrations must run, in this order, before the ADC measures
// accurately, and they are repeated from time to time to follow temperature:
//   1. delay chain length   (dc_length_cal; chains see a phase-shifted clock)
//   2. pulse alignment      (align_cal; steps the input delay)
//   3. bin-by-bin histogram (bin_correction, both edge directions at once)
// The third, voltage-characteristic calibration needs a known ramp on the
// input and is loaded from outside through the voltage table write port.
//
// A calibration run starts after reset when AUTO_START is set, on a cal_i
// pulse, or, when RECAL_CYCLES is not zero, after RECAL_CYCLES cycles of
// measurement. Each step is started with a one-cycle pulse and ends with the
// sub-block's done pulse (bin-by-bin: both tables ready). run_o is high only
// in the measurement state; the output samples are gated with it.
//
// Origin: the three calibrations before measuring and their periodic repetition
// follow the published design; the order, the start/done pulses, AUTO_START and
// RECAL_CYCLES are this design's own choices, and the control runs on the
// sample clock here instead of a separate 200 MHz clock.
module adc_control
  import adc_pkg::*;
#(
  parameter bit          AUTO_START   = 1'b1,
  parameter int unsigned RECAL_CYCLES = 0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       cal_i,        // request a calibration run
  output ctl_state_e state_o,
  output logic       run_o,
  output logic       dc_start_o,
  input  logic       dc_done_i,
  output logic       al_start_o,
  input  logic       al_done_i,
  output logic       bin_start_o,
  input  logic       bin_ready_i,  // both bin-by-bin tables built
  output logic [15:0] n_cal_o      // completed calibration runs
);

  ctl_state_e  state;
  logic        pending;
  logic [31:0] run_cnt;
  logic        bin_started;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= CTL_IDLE;
      pending     <= AUTO_START;
      run_cnt     <= '0;
      dc_start_o  <= 1'b0;
      al_start_o  <= 1'b0;
      bin_start_o <= 1'b0;
      bin_started <= 1'b0;
      n_cal_o     <= '0;
    end else begin
      dc_start_o  <= 1'b0;
      al_start_o  <= 1'b0;
      bin_start_o <= 1'b0;
      if (cal_i) pending <= 1'b1;
      unique case (state)
        CTL_IDLE, CTL_RUN: begin
          if (state == CTL_RUN) run_cnt <= run_cnt + 1'b1;
          if (pending || cal_i ||
              (state == CTL_RUN && RECAL_CYCLES != 0 && run_cnt == 32'(RECAL_CYCLES - 1))) begin
            pending    <= 1'b0;
            dc_start_o <= 1'b1;
            state      <= CTL_DC_LEN;
          end
        end
        CTL_DC_LEN: begin
          if (dc_done_i) begin
            al_start_o <= 1'b1;
            state      <= CTL_ALIGN;
          end
        end
        CTL_ALIGN: begin
          if (al_done_i) begin
            bin_start_o <= 1'b1;
            bin_started <= 1'b0;
            state       <= CTL_BIN;
          end
        end
        CTL_BIN: begin
          // the tables report not-ready from the cycle after the start pulse
          bin_started <= 1'b1;
          if (bin_started && bin_ready_i) begin
            run_cnt <= '0;
            n_cal_o <= n_cal_o + 1'b1;
            state   <= CTL_RUN;
          end
        end
        default: state <= CTL_IDLE;
      endcase
    end
  end

  assign state_o = state;
  assign run_o   = (state == CTL_RUN);

endmodule
