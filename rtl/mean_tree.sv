// mean_tree - registered mean of N equally weighted samples.
//
// Used twice in the ADC: after the four edge detectors, to average the edge
// position of the four parallel delay chains (this lowers the effective bin
// width), and at the output, to average the rising-slope and falling-slope
// samples of one clock period into one 600 MS/s sample.
// The mean is the sum shifted right by log2(N), i.e. rounded down; the result
// keeps the input width. The output is valid only when every input is valid
// (a chain that found no edge invalidates the averaged sample).
//
// Interface: N values with N valid flags in, one value with a valid flag out.
// Timing: one cycle.
//
// Origin: averaging the four chains and the two slopes follows the published
// design; truncation and the all-valid rule are this design's choices.
module mean_tree #(
  parameter int unsigned N = adc_pkg::N_CHAINS,
  parameter int unsigned W = adc_pkg::POS_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] valid_i,
  input  logic [W-1:0] val_i [N],
  output logic         valid_o,
  output logic [W-1:0] val_o
);

  localparam int unsigned LOG_N = $clog2(N);

  logic [W+LOG_N-1:0] sum;

  always_comb begin
    sum = '0;
    for (int n = 0; n < int'(N); n++) sum += (W+LOG_N)'(val_i[n]);
  end

  always_ff @(posedge clk) begin
    val_o <= sum[W+LOG_N-1 -: W];
  end

  always_ff @(posedge clk) begin
    if (rst) valid_o <= 1'b0;
    else     valid_o <= &valid_i;
  end

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("mean_tree: N must be a power of two >= 2");
  end

endmodule
