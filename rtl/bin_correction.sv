// bin_correction - bin-by-bin linearisation of one TDC edge position.
//
// The carry elements of an FPGA have very unequal delays, so a raw tap
// position is a poor time measure. A code density test fixes this: with an
// input that is uncorrelated to the clock, the number of hits H(k) that land
// in bin k is proportional to the width of that bin. The corrected time of a
// bin is the centre of the bin on the cumulative scale,
//     T(k) = (sum_{i<k} H(i) + H(k)/2) / sum_i H(i)    (fraction of the range),
// which is the bin index corrected by the integral nonlinearity taken at the
// bin centre. Writing it as a fraction of exactly 2^HIST_LOG2 hits makes the
// division a shift:
//     LUT(k) = (2*sum_{i<k} H(i) + H(k)) >> (HIST_LOG2 + 1 - OUT_W)
// saturated to OUT_W bits.
//
// Calibration (after a pulse on cal_start):
//   CLEAR  NBINS cycles, histogram set to zero
//   COUNT  the next 2^HIST_LOG2 valid positions each add one hit to their bin
//   BUILD  NBINS cycles, one LUT entry per cycle from a running sum
//   READY  lut_ready_o high; corrected values flow out
// The histogram, DNL and INL of the method are folded into the single running
// sum of BUILD. Measurement: out = LUT(pos), LATENCY cycles after pos_i (a
// registered table read plus balancing registers); out_valid_o only while
// the table is ready. One block is used per edge direction.
//
// Origin: the code-density histogram and the bin-centre correction (INL of the
// bins below plus half of the bin's own) follow the published design; the
// histogram size 2^HIST_LOG2, the output width and the clear/count/build
// sequence are this design's own choices.
module bin_correction #(
  parameter int unsigned NBINS     = adc_pkg::N_TAPS,
  parameter int unsigned IN_W      = adc_pkg::POS_W,
  parameter int unsigned OUT_W     = adc_pkg::TIME_W,
  parameter int unsigned HIST_LOG2 = adc_pkg::HIST_LOG2,
  parameter int unsigned LATENCY   = adc_pkg::BIN_LAT
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cal_start_i,
  output logic              cal_busy_o,
  output logic              lut_ready_o,
  input  logic              valid_i,
  input  logic [IN_W-1:0]   pos_i,
  output logic              valid_o,
  output logic [OUT_W-1:0]  val_o
);

  localparam int unsigned HW   = HIST_LOG2 + 1;        // hit counter width
  localparam int unsigned AW   = $clog2(NBINS);
  localparam int unsigned SH   = HIST_LOG2 + 1 - OUT_W;

  typedef enum logic [1:0] {S_CLEAR, S_COUNT, S_BUILD, S_IDLE} state_e;

  state_e            state;
  logic [HW-1:0]     hist [NBINS];
  logic [OUT_W-1:0]  lut  [NBINS];
  logic [AW-1:0]     idx;
  logic [HW-1:0]     hits;     // samples counted so far
  logic [HW:0]       acc2;     // 2 * sum of hits below idx
  logic              ready;

  logic [AW-1:0]     pos_c;
  assign pos_c = (pos_i >= IN_W'(NBINS)) ? AW'(NBINS - 1) : AW'(pos_i);

  // LUT entry for the bin at idx during BUILD
  logic [HW:0]       num;
  logic [OUT_W-1:0]  lut_val;
  always_comb begin
    num = acc2 + (HW+1)'(hist[idx]);
    if ((num >> SH) > (HW+1)'((1 << OUT_W) - 1)) lut_val = '1;
    else                                          lut_val = OUT_W'(num >> SH);
  end

  // Control
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      idx   <= '0;
      hits  <= '0;
      acc2  <= '0;
      ready <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: ;
        S_CLEAR: begin
          idx <= idx + 1'b1;
          if (idx == AW'(NBINS - 1)) begin
            idx   <= '0;
            hits  <= '0;
            state <= S_COUNT;
          end
        end
        S_COUNT: begin
          if (valid_i) begin
            hits <= hits + 1'b1;
            if (hits == HW'((1 << HIST_LOG2) - 1)) begin
              idx   <= '0;
              acc2  <= '0;
              state <= S_BUILD;
            end
          end
        end
        S_BUILD: begin
          acc2 <= acc2 + {hist[idx], 1'b0};
          idx  <= idx + 1'b1;
          if (idx == AW'(NBINS - 1)) begin
            ready <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
      if (cal_start_i) begin
        state <= S_CLEAR;
        idx   <= '0;
        ready <= 1'b0;
      end
    end
  end

  // Histogram memory
  always_ff @(posedge clk) begin
    if (state == S_CLEAR)
      hist[idx] <= '0;
    else if (state == S_COUNT && valid_i)
      hist[pos_c] <= hist[pos_c] + 1'b1;
  end

  // Correction table
  always_ff @(posedge clk) begin
    if (state == S_BUILD) lut[idx] <= lut_val;
  end

  // Measurement path: registered read, then balancing registers.
  logic [OUT_W-1:0] rd_q;
  logic             rd_v;
  always_ff @(posedge clk) rd_q <= lut[pos_c];
  always_ff @(posedge clk) begin
    if (rst) rd_v <= 1'b0;
    else     rd_v <= valid_i && ready;
  end

  if (LATENCY == 1) begin : g_nopad
    assign val_o   = rd_q;
    assign valid_o = rd_v;
  end else begin : g_pad
    logic [OUT_W-1:0] pd [LATENCY-1];
    logic             pv [LATENCY-1];
    always_ff @(posedge clk) begin
      pd[0] <= rd_q;
      for (int p = 1; p < int'(LATENCY) - 1; p++) pd[p] <= pd[p-1];
    end
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int p = 0; p < int'(LATENCY) - 1; p++) pv[p] <= 1'b0;
      end else begin
        pv[0] <= rd_v;
        for (int p = 1; p < int'(LATENCY) - 1; p++) pv[p] <= pv[p-1];
      end
    end
    assign val_o   = pd[LATENCY-2];
    assign valid_o = pv[LATENCY-2];
  end

  assign cal_busy_o  = (state != S_IDLE);
  assign lut_ready_o = ready;

  if (HIST_LOG2 + 1 < OUT_W) begin : g_bad_hist
    $error("bin_correction: need HIST_LOG2 + 1 >= OUT_W");
  end
  if (LATENCY < 1) begin : g_bad_lat
    $error("bin_correction: LATENCY must be at least 1");
  end

endmodule
