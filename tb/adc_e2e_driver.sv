// adc_e2e_driver - end-to-end stimulus, device models and checks for
// fpga_adc_top, shared by the reduced-size and the full-size testbench.
//
// Device models (behavioural, not synthesizable):
//  * reference slope: rising half period V = 1.8 V * (x + 0.2 sin(pi x)),
//    x = 0..1, falling half the mirror image; the comparator output is high
//    while the slope is above the input, i.e. from t_r to T - t_r;
//  * four carry chains with random tap delays (0.25 .. 1.75 x the mean, the
//    mean set so that one period spans 85/96 of the chain, as 852 of 960
//    taps do at full size) and a per-chain routing offset; tap t
//    holds the comparator (or, in length calibration, the clock) as it was
//    D[t] + input delay before the sampling edge; O outputs are driven
//    inverted, as the real XOR outputs are;
//  * clock manager phase steps of T / N_PHASES, answered after 3 cycles;
//  * input delay of half a mean carry tap per IDELAY tap, the pulse centre
//    8 carry taps off the middle at reset.
//
// Test program: the automatic calibration (length with a clock in the chain,
// alignment with a 0.9 V DC input, bin-by-bin with a random input) is
// checked; the voltage tables are written for the ideal ramp match; then
// random inputs, with injected bubbles and blanked chains, are converted and
// every output is compared, 26 cycles later, with the input voltage. A step
// input checks the latency, the capture buffer is filled to overflow and read
// back, and a requested recalibration is run and checked.
// Mechanisms counted (each must occur): bubble filtered, sample invalidated,
// 1.2 GS/s and 600 MS/s samples, latency step, alignment moves, phase steps,
// buffer overflow, recalibration.
//
// The reference values follow the published method (ramp-crossing times, two
// samples per period, 26-cycle latency); the ramp shape, tap-delay spread,
// jitter, bubble rate and tolerances are this testbench's own choices.
module adc_e2e_driver #(
  parameter int unsigned N_CARRY8   = adc_pkg::N_CARRY8,
  parameter int unsigned HIST_LOG2  = adc_pkg::HIST_LOG2,
  parameter int unsigned N_PHASES   = adc_pkg::N_PHASES,
  parameter int unsigned FIFO_DEPTH = 4096,
  parameter int unsigned N_RUN      = 2000,
  parameter int unsigned N_ELEM     = 8 * N_CARRY8,
  parameter int unsigned N_TAPS     = 2 * N_ELEM,
  parameter int unsigned PW         = $clog2(N_TAPS + 1)
) (
  output logic                                      clk,
  output logic                                      rst,
  output logic [adc_pkg::N_CHAINS-1:0][N_ELEM-1:0]  co,
  output logic [adc_pkg::N_CHAINS-1:0][N_ELEM-1:0]  o,
  input  logic                                      chain_sel_clk,
  input  logic                                      ps_en,
  output logic                                      ps_done,
  input  logic [adc_pkg::DLY_W-1:0]                 idelay_tap,
  input  logic                                      idelay_load,
  output logic                                      cal,
  input  adc_pkg::ctl_state_e                       state,
  input  logic                                      run,
  input  logic                                      cal_busy,
  input  logic [15:0]                               n_cal,
  input  logic [PW:0]                               chain_len,
  input  logic                                      align_fail,
  output logic                                      vlut_we,
  output logic                                      vlut_sel,
  output logic [adc_pkg::TIME_W-1:0]                vlut_addr,
  output logic [adc_pkg::VOUT_W-1:0]                vlut_data,
  input  logic                                      s1g2_valid,
  input  logic [adc_pkg::VOUT_W-1:0]                s_rise,
  input  logic [adc_pkg::VOUT_W-1:0]                s_fall,
  input  logic                                      s600_valid,
  input  logic [adc_pkg::VOUT_W-1:0]                s600,
  output logic                                      fifo_arm,
  output logic                                      fifo_clr,
  output logic                                      fifo_rd,
  input  logic [2*adc_pkg::VOUT_W-1:0]              fifo_data,
  input  logic                                      fifo_empty,
  input  logic                                      fifo_full,
  input  logic                                      fifo_overflow,
  input  logic [$clog2(FIFO_DEPTH):0]               fifo_count
);
  import adc_pkg::*;

  localparam int  NC   = int'(N_CHAINS);
  localparam int  LAT  = 26;                  // cycles, capture to output
  localparam real T    = 1666.667;            // ps, 600 MHz
  localparam real VA   = 0.8, VB = 1.6;       // input range used
  localparam int  VCODES = 1 << VOUT_W;

  int checks = 0, failures = 0;
  int n_bubble = 0, n_blank = 0, n_blank_ok = 0, n_s1g2 = 0, n_s600 = 0;
  int n_step = 0, n_align_moves = 0, n_ps = 0, n_ovf = 0, n_recal = 0;

  real dly_tap [NC][N_TAPS];   // cumulative delay to each tap
  real delta0, delta;          // input delay
  real tap_mean;
  real dstep;                  // input delay per IDELAY tap
  int  phase = 0;
  int  cyc = 0;

  // per-cycle record of what was presented to the chains
  typedef struct { bit valid; real vin; bit blank; bit comp; } rec_t;
  rec_t hist_rec [int];

  // ---------------- clock ----------------
  initial clk = 1'b0;
  always #1 clk = ~clk;

  // ---------------- models ----------------
  function automatic real slope_rise(real x);
    return 1.8 * (x + 0.2 * $sin(3.14159265358979 * x));
  endfunction

  // time of the comparator rising edge within the period for input v
  function automatic real t_rise(real v);
    real lo = 0.0, hi = 1.0, mid;
    for (int i = 0; i < 40; i++) begin
      mid = (lo + hi) / 2.0;
      if (slope_rise(mid) < v) lo = mid; else hi = mid;
    end
    return lo * T / 2.0;
  endfunction

  function automatic real fmod_pos(real x);
    return x - T * $floor(x / T);
  endfunction

  // chain pattern: comparator mode (tr = rising edge time) or clock mode
  function automatic logic [N_TAPS-1:0] pattern(int c, bit clock_mode, real tr, real jit);
    logic [N_TAPS-1:0] p;
    for (int t = 0; t < int'(N_TAPS); t++) begin
      real tau;
      if (clock_mode) begin
        tau = fmod_pos(-(dly_tap[c][t] + real'(phase) * T / real'(N_PHASES)));
        p[t] = tau < T / 2.0;
      end else begin
        tau = fmod_pos(-(dly_tap[c][t] + delta + jit));
        p[t] = (tau > tr) && (tau < T - tr);
      end
    end
    return p;
  endfunction

  task automatic drive_chain(int c, logic [N_TAPS-1:0] p);
    for (int e = 0; e < int'(N_ELEM); e++) begin
      o[c][e]  = ~p[2*e];
      co[c][e] = p[2*e+1];
    end
  endtask

  // clock manager phase shift
  initial ps_done = 1'b0;
  always @(posedge clk) begin
    if (!rst && ps_en) begin
      n_ps++;
      fork begin
        repeat (3) @(posedge clk);
        phase = (phase + 1) % int'(N_PHASES);
        ps_done <= 1'b1;
        @(posedge clk);
        ps_done <= 1'b0;
      end join_none
    end
  end

  // input delay
  always @(posedge clk) begin
    if (!rst && idelay_load) begin
      delta = delta0 + (real'(idelay_tap) - 256.0) * dstep;
      n_align_moves++;
    end
  end

  // ---------------- stimulus per cycle ----------------
  real vin_prog;       // input voltage chosen by the program in RUN
  bit  inject = 0;     // inject bubbles and blanked chains
  bit  vin_step_mode = 0;

  always @(posedge clk) begin
    rec_t r;
    real  v, tr;
    cyc <= cyc + 1;
    #0.1;
    r.valid = 0; r.blank = 0; r.vin = 0.0; r.comp = 0;
    if (chain_sel_clk) begin
      for (int c = 0; c < NC; c++) drive_chain(c, pattern(c, 1'b1, 0.0, 0.0));
    end else begin
      unique case (state)
        CTL_BIN: v = VA + (VB - VA) * real'($urandom % 100000) / 100000.0;
        CTL_RUN: v = vin_prog;
        default: v = 0.9;
      endcase
      tr = t_rise(v);
      r.comp = 1; r.vin = v; r.valid = (state == CTL_RUN);
      for (int c = 0; c < NC; c++) begin
        logic [N_TAPS-1:0] p;
        p = pattern(c, 1'b0, tr, real'($urandom % 100) / 100.0 * tap_mean * 0.5);
        if (inject && ($urandom % 8 == 0)) begin
          // clear one tap just inside the pulse, next to a clean first
          // 0->1 edge (eight zeros before it, eight ones from it on)
          int t;
          t = 8;
          while (t < int'(N_TAPS) - 9 && !(p[t] && !p[t-1])) t = t + 1;
          if (t < int'(N_TAPS) - 9 && p[t-8 +: 8] == 8'h00 && p[t +: 8] == 8'hFF) begin
            p[t + 1] = 1'b0;
            n_bubble++;
          end
        end
        if (inject && c == 2 && ($urandom % 64 == 0)) begin
          p = '0;
          r.blank = 1;
        end
        drive_chain(c, p);
      end
    end
    hist_rec[cyc + 1] = r;   // sampled by the capture stage at the next edge
  end

  // ---------------- output checks ----------------
  int fifo_exp [$];
  real tolc;

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic int ideal_code(real v);
    real c = (v - VA) / (VB - VA) * real'(VCODES);
    if (c < 0.0) c = 0.0;
    if (c > real'(VCODES - 1)) c = real'(VCODES - 1);
    return int'($floor(c));
  endfunction

  always @(posedge clk) begin
    rec_t r;
    int k, e;
    #0.2;
    k = cyc - (LAT - 1);
    if (!rst && hist_rec.exists(k) && run && s1g2_valid !== 1'bx) begin
      r = hist_rec[k];
      if (r.valid && r.comp && tolc > 0.0) begin
        checks++;
        if (r.blank) begin
          if (s1g2_valid || s600_valid) failures++;
          else n_blank_ok++;
          n_blank++;
        end else if (!s1g2_valid || !s600_valid) begin
          failures++;
          if (failures < 10) $display("cycle %0d: no valid sample", k);
        end else begin
          e = ideal_code(r.vin);
          checks += 3;
          if (absr(real'(int'(s_fall) - e)) > tolc ||
              absr(real'(int'(s_rise) - e)) > tolc) begin
            failures++;
            if (failures < 10) $display("cycle %0d vin %f: rise %0d fall %0d exp %0d", k, r.vin,
                                        s_rise, s_fall, e);
          end
          if (int'(s600) != (int'(s_rise) + int'(s_fall)) / 2) failures++;
          if (absr(real'(int'(s600) - e)) > tolc) failures++;
          n_s1g2++;
          n_s600++;
          if (fifo_arm && fifo_exp.size() < int'(FIFO_DEPTH)) fifo_exp.push_back({s_rise, s_fall});
        end
      end
      hist_rec.delete(k - 10);
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000 + 3 * (1 << HIST_LOG2) + 100 * int'(N_PHASES)) @(posedge clk);
    failures++;
    $display("watchdog expired in state %0d", state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program ----------------
  initial begin
    int min_ones, exp_len, n_ovf_seen;
    real d_mid, d_ideal;
    rst = 1'b1; cal = 1'b0; vlut_we = 1'b0; vlut_sel = 1'b0; vlut_addr = '0; vlut_data = '0;
    fifo_arm = 1'b0; fifo_clr = 1'b0; fifo_rd = 1'b0; tolc = 0.0; vin_prog = 0.9;
    co = '0; o = '1;
    // chains: random tap delays, 960/852 periods long
    tap_mean = (960.0 / 852.0) * T / real'(N_TAPS);
    for (int c = 0; c < NC; c++) begin
      automatic real acc = real'(c) * 0.3 * tap_mean;
      for (int t = 0; t < int'(N_TAPS); t++) begin
        acc += tap_mean * (0.25 + 1.5 * real'($urandom % 1000) / 1000.0);
        dly_tap[c][t] = acc;
      end
    end
    // input delay: pulse centre at the middle tap needs -(D_mid + delta) = T/2 (mod T)
    d_mid = 0.0;
    for (int c = 0; c < NC; c++) d_mid += dly_tap[c][N_TAPS / 2] / real'(NC);
    d_ideal = fmod_pos(-T / 2.0 - d_mid);
    dstep  = tap_mean / 2.0;
    delta0 = d_ideal - 16.0 * dstep;    // pulse 8 taps above the middle
    delta = delta0;
    // expected chain length: twice the fewest ones of chain 0 over the phases
    min_ones = 1 << 30;
    for (int ph = 0; ph < int'(N_PHASES); ph++) begin
      int n1;
      phase = ph;
      n1 = $countones(pattern(0, 1'b1, 0.0, 0.0));
      if (n1 < min_ones) min_ones = n1;
    end
    phase = 0;
    exp_len = 2 * min_ones;

    repeat (4) @(posedge clk);
    rst <= 1'b0;

    // ---- automatic calibration ----
    while (!run) @(posedge clk);
    checks += 4;
    if (int'(chain_len) != exp_len) begin
      failures++; $display("chain length %0d, expected %0d", chain_len, exp_len);
    end
    if (align_fail) begin failures++; $display("alignment failed"); end
    if (n_align_moves < 4) begin failures++; $display("only %0d alignment moves", n_align_moves); end
    if (n_cal != 1) failures++;
    $display("calibrated: chain length %0d taps, input delay tap %0d, %0d phase steps",
             chain_len, idelay_tap, n_ps);

    // ---- voltage characteristic tables for the ideal ramp match ----
    for (int a = 0; a < (1 << TIME_W); a++) begin
      @(posedge clk);
      vlut_we   <= 1'b1;
      vlut_sel  <= 1'b0;                                   // rise: decreasing in time code
      vlut_addr <= TIME_W'(a);
      vlut_data <= VOUT_W'(((1 << TIME_W) - 1 - a) >> (TIME_W - VOUT_W));
      @(posedge clk);
      vlut_sel  <= 1'b1;                                   // fall: increasing
      vlut_data <= VOUT_W'(a >> (TIME_W - VOUT_W));
    end
    @(posedge clk) vlut_we <= 1'b0;
    repeat (LAT + 2) @(posedge clk);

    // tolerance: one tap at the steepest slope, in codes, plus statistics
    tolc = 32.0 + real'(VCODES) / (VB - VA) * (1.8 * 1.63 / (T / 2.0)) * tap_mean;
    $display("tolerance %f codes", tolc);

    // ---- random conversion with bubbles and blanked chains ----
    inject = 1;
    for (int n = 0; n < int'(N_RUN); n++) begin
      @(posedge clk);
      vin_prog = VA + 0.02 + (VB - VA - 0.04) * real'($urandom % 10000) / 10000.0;
      if (n == int'(N_RUN) / 2) fifo_arm <= 1'b1;
    end
    inject = 0;
    fifo_arm <= 1'b0;

    // ---- latency: step from low to high input ----
    begin
      automatic int k_step = 0, seen = 0;
      vin_prog = VA + 0.1;
      repeat (LAT + 5) @(posedge clk);
      @(posedge clk);
      vin_prog = VB - 0.1;
      #0.3;                             // the stimulus has now taken the new input
      k_step = cyc + 1;                 // capture edge that samples it
      for (int w = 0; w < 2 * LAT; w++) begin
        @(posedge clk); #0.3;
        if (s1g2_valid && int'(s600) > VCODES / 2 && seen == 0) seen = cyc;
      end
      checks++;
      if (seen - k_step + 1 != LAT) begin
        failures++; $display("latency %0d cycles, expected %0d", seen - k_step + 1, LAT);
      end else n_step++;
    end

    // ---- capture buffer: overflow, then read back ----
    checks += 2;
    n_ovf_seen = fifo_overflow;
    if (n_ovf_seen) n_ovf++;
    if (!fifo_overflow && int'(N_RUN) / 2 > int'(FIFO_DEPTH)) failures++;
    while (!fifo_empty) begin
      checks++;
      if (fifo_exp.size() == 0 || fifo_data != 20'(fifo_exp.pop_front())) failures++;
      @(posedge clk) fifo_rd <= 1'b1;
      @(posedge clk) fifo_rd <= 1'b0;
      #0.3;
    end
    if (fifo_exp.size() != 0) begin failures++; $display("%0d buffer words missing", fifo_exp.size()); end
    @(posedge clk) fifo_clr <= 1'b1;
    @(posedge clk) fifo_clr <= 1'b0;

    // ---- requested recalibration ----
    @(posedge clk) cal <= 1'b1;
    @(posedge clk) cal <= 1'b0;
    #0.3;
    checks++;
    if (run) failures++;
    while (!run) @(posedge clk);
    checks += 2;
    if (n_cal != 2) failures++;
    if (align_fail) failures++;
    else n_recal++;
    for (int n = 0; n < 200; n++) begin
      @(posedge clk);
      vin_prog = VA + 0.02 + (VB - VA - 0.04) * real'($urandom % 10000) / 10000.0;
    end
    repeat (LAT + 2) @(posedge clk);

    // ---- every mechanism must have happened ----
    $display("bubbles %0d, blanked %0d (%0d invalidated), 1.2GS/s %0d, 600MS/s %0d, step %0d",
             n_bubble, n_blank, n_blank_ok, n_s1g2, n_s600, n_step);
    $display("alignment moves %0d, phase steps %0d, overflow %0d, recalibration %0d",
             n_align_moves, n_ps, n_ovf, n_recal);
    checks += 9;
    if (n_bubble == 0)      failures++;
    if (n_blank_ok == 0)    failures++;
    if (n_s1g2 == 0)        failures++;
    if (n_s600 == 0)        failures++;
    if (n_step == 0)        failures++;
    if (n_align_moves == 0) failures++;
    if (n_ps != 2 * int'(N_PHASES)) failures++;
    if (n_ovf == 0 && int'(N_RUN) / 2 > int'(FIFO_DEPTH)) failures++;
    if (n_recal == 0)       failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
