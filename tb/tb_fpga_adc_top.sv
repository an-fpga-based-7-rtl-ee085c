// tb_fpga_adc_top - end-to-end test of the ADC with 8 CARRY8 blocks per
// chain (128 taps), 2^12-hit histograms, 16 phase steps and a 64-word
// capture buffer; all latencies at their full values. The stimulus, device
// models and checks are in adc_e2e_driver.
//
// Reduced sizes are this testbench's choice; latencies stay at the published
// values.
module tb_fpga_adc_top;
  localparam int unsigned NB = 8, HL = 12, NPH = 16, FD = 64;
  localparam int unsigned NE = 8 * NB, NT = 2 * NE, PW = $clog2(NT + 1);

  logic clk, rst, sel, ps_en, ps_done, dload, cal, run, cbusy, afail;
  logic [adc_pkg::N_CHAINS-1:0][NE-1:0] co, o;
  logic [adc_pkg::DLY_W-1:0] dtap;
  adc_pkg::ctl_state_e state;
  logic [15:0] ncal;
  logic [PW:0] clen;
  logic vwe, vsel;
  logic [adc_pkg::TIME_W-1:0] vaddr;
  logic [adc_pkg::VOUT_W-1:0] vdata, sr, sf, s6;
  logic v12, v6, farm, fclr, frd, fempty, ffull, fovf;
  logic [2*adc_pkg::VOUT_W-1:0] fdata;
  logic [$clog2(FD):0] fcnt;

  fpga_adc_top #(.N_CARRY8(NB), .HIST_LOG2(HL), .N_PHASES(NPH), .FIFO_DEPTH(FD)) dut (
    .clk, .rst, .co_i(co), .o_i(o), .chain_sel_clk_o(sel), .ps_en_o(ps_en), .ps_done_i(ps_done),
    .idelay_tap_o(dtap), .idelay_load_o(dload), .cal_i(cal), .state_o(state), .run_o(run),
    .cal_busy_o(cbusy), .n_cal_o(ncal), .chain_len_o(clen), .align_fail_o(afail),
    .vlut_we_i(vwe), .vlut_sel_i(vsel), .vlut_addr_i(vaddr), .vlut_data_i(vdata),
    .s1g2_valid_o(v12), .s_rise_o(sr), .s_fall_o(sf), .s600_valid_o(v6), .s600_o(s6),
    .fifo_arm_i(farm), .fifo_clr_i(fclr), .fifo_rd_i(frd), .fifo_data_o(fdata),
    .fifo_empty_o(fempty), .fifo_full_o(ffull), .fifo_overflow_o(fovf), .fifo_count_o(fcnt));

  adc_e2e_driver #(.N_CARRY8(NB), .HIST_LOG2(HL), .N_PHASES(NPH), .FIFO_DEPTH(FD), .N_RUN(1500)) drv (
    .clk, .rst, .co, .o, .chain_sel_clk(sel), .ps_en, .ps_done, .idelay_tap(dtap),
    .idelay_load(dload), .cal, .state, .run, .cal_busy(cbusy), .n_cal(ncal), .chain_len(clen),
    .align_fail(afail), .vlut_we(vwe), .vlut_sel(vsel), .vlut_addr(vaddr), .vlut_data(vdata),
    .s1g2_valid(v12), .s_rise(sr), .s_fall(sf), .s600_valid(v6), .s600(s6),
    .fifo_arm(farm), .fifo_clr(fclr), .fifo_rd(frd), .fifo_data(fdata), .fifo_empty(fempty),
    .fifo_full(ffull), .fifo_overflow(fovf), .fifo_count(fcnt));
endmodule
