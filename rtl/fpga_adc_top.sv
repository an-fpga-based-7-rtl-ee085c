// fpga_adc_top - digital core of a slope ADC built from FPGA fabric only.
//
// A 600 MHz clock drives a single-ended output buffer whose output impedance
// and slow slew rate, together with the pad capacitance, turn each clock
// half-period into a rising or falling reference slope. An LVDS input buffer
// compares that slope with the analog input; its output is high while the
// slope is above the input, so the times of its two edges within a clock
// period encode the input voltage twice (once per slope). Those analog parts,
// the clock manager, the programmable input delay and the carry-chain delay
// lines are device primitives and sit outside this module: the four carry
// chains' CO/O outputs come in as co_i / o_i, and their controls go out.
//
// Datapath, one sample pair per clock (latencies in cycles):
//   tdc_capture x4     2   two flip-flop stages, O inversion, tap reordering
//   edge_detector x4  13   bubble filter and first edge of each direction
//   mean_tree x2       1   mean position over the four chains, per direction
//   bin_correction x2  6   code-density (bin-by-bin) linearisation
//   voltage_lut x2     3   time-to-voltage characteristic
//   mean_tree          1   mean of the two slopes -> 600 MS/s sample
// Both outputs appear 26 cycles after the carry chain state they come from:
// s_rise_o / s_fall_o together are the 1.2 GS/s stream (two samples per
// clock), s600_o is the 600 MS/s stream.
//
// Calibration (adc_control): delay chain length (chain 0 sees a phase-shifted
// clock, chain_sel_clk_o; MMCM phase step handshake ps_en_o / ps_done_i),
// alignment (IDELAY tap idelay_tap_o, load strobe idelay_load_o), then the
// bin-by-bin histograms. The voltage tables are written through vlut_*.
// Everything runs on one clock here; the original splits calibration and
// control onto a slower 200 MHz clock.
// Captured 1.2 GS/s pairs can be stored in sample_fifo when fifo_arm_i is set.
module fpga_adc_top #(
  parameter int unsigned N_CARRY8     = adc_pkg::N_CARRY8,
  parameter int unsigned BF_K         = adc_pkg::BF_K,
  parameter int unsigned HIST_LOG2    = adc_pkg::HIST_LOG2,
  parameter int unsigned N_PHASES     = adc_pkg::N_PHASES,
  parameter int unsigned ALIGN_TOL    = 4,
  parameter int unsigned RECAL_CYCLES = 0,
  parameter int unsigned FIFO_DEPTH   = 4096,
  parameter logic [63:0] REORDER      = 64'hFEDC_BA98_7654_3210,
  // derived
  parameter int unsigned N_ELEM       = 8 * N_CARRY8,
  parameter int unsigned N_TAPS       = 2 * N_ELEM,
  parameter int unsigned PW           = $clog2(N_TAPS + 1)
) (
  input  logic                                 clk,
  input  logic                                 rst,
  // carry chains (delay lines)
  input  logic [adc_pkg::N_CHAINS-1:0][N_ELEM-1:0]      co_i,
  input  logic [adc_pkg::N_CHAINS-1:0][N_ELEM-1:0]      o_i,
  output logic                                 chain_sel_clk_o,
  // clock manager phase shift
  output logic                                 ps_en_o,
  input  logic                                 ps_done_i,
  // comparator input delay
  output logic [adc_pkg::DLY_W-1:0]                     idelay_tap_o,
  output logic                                 idelay_load_o,
  // control / status
  input  logic                                 cal_i,
  output adc_pkg::ctl_state_e                           state_o,
  output logic                                 run_o,
  output logic                                 cal_busy_o,
  output logic [15:0]                          n_cal_o,
  output logic [PW:0]                          chain_len_o,
  output logic                                 align_fail_o,
  // voltage characteristic tables (sel 0: rise, 1: fall)
  input  logic                                 vlut_we_i,
  input  logic                                 vlut_sel_i,
  input  logic [adc_pkg::TIME_W-1:0]                    vlut_addr_i,
  input  logic [adc_pkg::VOUT_W-1:0]                    vlut_data_i,
  // samples
  output logic                                 s1g2_valid_o,
  output logic [adc_pkg::VOUT_W-1:0]                    s_rise_o,
  output logic [adc_pkg::VOUT_W-1:0]                    s_fall_o,
  output logic                                 s600_valid_o,
  output logic [adc_pkg::VOUT_W-1:0]                    s600_o,
  // capture buffer
  input  logic                                 fifo_arm_i,
  input  logic                                 fifo_clr_i,
  input  logic                                 fifo_rd_i,
  output logic [2*adc_pkg::VOUT_W-1:0]                  fifo_data_o,
  output logic                                 fifo_empty_o,
  output logic                                 fifo_full_o,
  output logic                                 fifo_overflow_o,
  output logic [$clog2(FIFO_DEPTH):0]          fifo_count_o
);

  // ---------------- capture and edge detection, per chain ----------------
  logic [1:0]             cap_v;
  logic [N_TAPS-1:0]      taps      [adc_pkg::N_CHAINS];
  logic [adc_pkg::N_CHAINS-1:0]    ed_v, f_found, r_found;
  logic [PW-1:0]          f_pos     [adc_pkg::N_CHAINS];
  logic [PW-1:0]          r_pos     [adc_pkg::N_CHAINS];

  always_ff @(posedge clk) begin
    if (rst) cap_v <= '0;
    else     cap_v <= {cap_v[0], 1'b1};
  end

  for (genvar c = 0; c < int'(adc_pkg::N_CHAINS); c++) begin : g_chain
    tdc_capture #(.N_CARRY8(N_CARRY8), .REORDER(REORDER)) u_cap (
      .clk, .co_i(co_i[c]), .o_i(o_i[c]), .taps_o(taps[c])
    );
    edge_detector #(.N_TAPS(N_TAPS), .K(BF_K), .LATENCY(adc_pkg::ED_LAT)) u_ed (
      .clk, .rst, .valid_i(cap_v[1]), .taps_i(taps[c]),
      .valid_o(ed_v[c]),
      .fall_found_o(f_found[c]), .fall_pos_o(f_pos[c]),
      .rise_found_o(r_found[c]), .rise_pos_o(r_pos[c])
    );
  end

  // ---------------- mean over the chains ----------------
  logic          mf_v, mr_v;
  logic [PW-1:0] mf_pos, mr_pos;

  mean_tree #(.N(adc_pkg::N_CHAINS), .W(PW)) u_mean_fall (
    .clk, .rst, .valid_i(ed_v & f_found), .val_i(f_pos), .valid_o(mf_v), .val_o(mf_pos)
  );
  mean_tree #(.N(adc_pkg::N_CHAINS), .W(PW)) u_mean_rise (
    .clk, .rst, .valid_i(ed_v & r_found), .val_i(r_pos), .valid_o(mr_v), .val_o(mr_pos)
  );

  // ---------------- calibration ----------------
  logic dc_start, dc_done, al_start, al_done, bin_start, dc_busy, al_busy;
  logic bf_ready, br_ready, bf_busy, br_busy;

  adc_control #(.AUTO_START(1'b1), .RECAL_CYCLES(RECAL_CYCLES)) u_ctl (
    .clk, .rst, .cal_i, .state_o, .run_o,
    .dc_start_o(dc_start), .dc_done_i(dc_done),
    .al_start_o(al_start), .al_done_i(al_done),
    .bin_start_o(bin_start), .bin_ready_i(bf_ready && br_ready),
    .n_cal_o
  );

  dc_length_cal #(.N_TAPS(N_TAPS), .N_PHASES(N_PHASES)) u_dcl (
    .clk, .rst, .start_i(dc_start), .busy_o(dc_busy), .done_o(dc_done),
    .sel_clk_o(chain_sel_clk_o), .ps_en_o, .ps_done_i,
    .taps_i(taps[0]), .len_o(chain_len_o)
  );

  align_cal #(.POS_W(PW), .MID(N_TAPS / 2), .TOL(ALIGN_TOL), .DLY_W(adc_pkg::DLY_W)) u_al (
    .clk, .rst, .start_i(al_start), .busy_o(al_busy), .done_o(al_done), .fail_o(align_fail_o),
    .valid_i(mf_v && mr_v), .fall_pos_i(mf_pos), .rise_pos_i(mr_pos),
    .dly_o(idelay_tap_o), .dly_load_o(idelay_load_o)
  );

  assign cal_busy_o = dc_busy || al_busy || bf_busy || br_busy;

  // ---------------- bin-by-bin correction ----------------
  logic              cf_v, cr_v;
  logic [adc_pkg::TIME_W-1:0] cf_val, cr_val;

  bin_correction #(.NBINS(N_TAPS), .IN_W(PW), .OUT_W(adc_pkg::TIME_W),
                   .HIST_LOG2(HIST_LOG2), .LATENCY(adc_pkg::BIN_LAT)) u_bin_fall (
    .clk, .rst, .cal_start_i(bin_start), .cal_busy_o(bf_busy), .lut_ready_o(bf_ready),
    .valid_i(mf_v), .pos_i(mf_pos), .valid_o(cf_v), .val_o(cf_val)
  );
  bin_correction #(.NBINS(N_TAPS), .IN_W(PW), .OUT_W(adc_pkg::TIME_W),
                   .HIST_LOG2(HIST_LOG2), .LATENCY(adc_pkg::BIN_LAT)) u_bin_rise (
    .clk, .rst, .cal_start_i(bin_start), .cal_busy_o(br_busy), .lut_ready_o(br_ready),
    .valid_i(mr_v), .pos_i(mr_pos), .valid_o(cr_v), .val_o(cr_val)
  );

  // ---------------- voltage characteristic ----------------
  logic              vf_v, vr_v;
  logic [adc_pkg::VOUT_W-1:0] vf_val, vr_val;

  voltage_lut #(.IN_W(adc_pkg::TIME_W), .OUT_W(adc_pkg::VOUT_W), .LATENCY(adc_pkg::VLUT_LAT)) u_vlut_fall (
    .clk, .rst, .wr_en_i(vlut_we_i && vlut_sel_i), .wr_addr_i(vlut_addr_i),
    .wr_data_i(vlut_data_i), .valid_i(cf_v), .val_i(cf_val), .valid_o(vf_v), .val_o(vf_val)
  );
  voltage_lut #(.IN_W(adc_pkg::TIME_W), .OUT_W(adc_pkg::VOUT_W), .LATENCY(adc_pkg::VLUT_LAT)) u_vlut_rise (
    .clk, .rst, .wr_en_i(vlut_we_i && !vlut_sel_i), .wr_addr_i(vlut_addr_i),
    .wr_data_i(vlut_data_i), .valid_i(cr_v), .val_i(cr_val), .valid_o(vr_v), .val_o(vr_val)
  );

  // ---------------- outputs ----------------
  logic              pair_v;
  logic [adc_pkg::VOUT_W-1:0] pair_val [2];
  assign pair_v      = vf_v && vr_v && run_o;
  assign pair_val[0] = vr_val;
  assign pair_val[1] = vf_val;

  mean_tree #(.N(2), .W(adc_pkg::VOUT_W)) u_mean_out (
    .clk, .rst, .valid_i({pair_v, pair_v}), .val_i(pair_val),
    .valid_o(s600_valid_o), .val_o(s600_o)
  );

  // 1.2 GS/s pair, registered once to line up with the 600 MS/s mean
  always_ff @(posedge clk) begin
    s_rise_o <= vr_val;
    s_fall_o <= vf_val;
  end
  always_ff @(posedge clk) begin
    if (rst) s1g2_valid_o <= 1'b0;
    else     s1g2_valid_o <= pair_v;
  end

  // ---------------- capture buffer ----------------
  sample_fifo #(.W(2 * adc_pkg::VOUT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .clr_i(fifo_clr_i),
    .wr_en_i(fifo_arm_i && s1g2_valid_o), .wr_data_i({s_rise_o, s_fall_o}),
    .rd_en_i(fifo_rd_i), .rd_data_o(fifo_data_o),
    .empty_o(fifo_empty_o), .full_o(fifo_full_o), .overflow_o(fifo_overflow_o), .count_o(fifo_count_o)
  );

endmodule
