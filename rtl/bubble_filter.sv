// bubble_filter - windowed ones-count over the delay line taps.
//
// A bubble is an isolated wrong bit near an edge in the captured delay line.
// Instead of looking at single taps, the filter counts ones in windows of k
// taps. Stages 1 .. n-1 form the sum over each disjoint group of k/2 taps with
// a tree of pairwise adders, one adder level per pipeline stage. Stage n forms
// the overlapping sum of neighbouring groups,
//     S(n, i) = S(n-1, i) + S(n-1, i+1),
// i.e. a k-tap window starting at tap i*k/2, so an edge that falls on a group
// boundary is still seen inside one window. Larger k filters bubbles over a
// wider neighbourhood.
//
// Interface: taps_i is one captured pattern; sum_o[i] is S(n, i) for window i
// (0 .. N_TAPS/(k/2) - 2). Timing: log2(k) cycles, one pattern per clock;
// valid_i is carried alongside as valid_o.
//
// Origin: the k/2-tap partial sums, the overlapping sum and k = 8 follow the
// published design; one register per adder level is this design's choice.
module bubble_filter #(
  parameter int unsigned N_TAPS = adc_pkg::N_TAPS,
  parameter int unsigned K      = adc_pkg::BF_K,
  // derived
  parameter int unsigned H      = K / 2,
  parameter int unsigned N_GRP  = N_TAPS / H,
  parameter int unsigned SW     = $clog2(K + 1),
  parameter int unsigned LAT    = $clog2(K)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 valid_i,
  input  logic [N_TAPS-1:0]    taps_i,
  output logic                 valid_o,
  output logic [SW-1:0]        sum_o [N_GRP-1]
);

  localparam int unsigned LOG_H = $clog2(H);

  // lv[l][j] is the ones count of taps j*2^l .. j*2^l + 2^l - 1 (l >= 1)
  logic [SW-1:0]  lv [1:LOG_H][N_TAPS/2];
  logic [LAT-1:0] vpipe;

  // Stages 1 .. n-1: disjoint group sums over k/2 taps, one adder level each.
  always_ff @(posedge clk) begin
    for (int j = 0; j < int'(N_TAPS / 2); j++)
      lv[1][j] <= SW'(taps_i[2*j]) + SW'(taps_i[2*j+1]);
    for (int l = 2; l <= int'(LOG_H); l++)
      for (int j = 0; j < int'(N_TAPS >> l); j++)
        lv[l][j] <= lv[l-1][2*j] + lv[l-1][2*j+1];
  end

  // Stage n: overlapping sums.
  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(N_GRP) - 1; i++)
      sum_o[i] <= lv[LOG_H][i] + lv[LOG_H][i+1];
  end

  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[LAT-2:0], valid_i};
  end
  assign valid_o = vpipe[LAT-1];

  if (K < 4 || (K & (K - 1)) != 0) begin : g_bad_k
    $error("bubble_filter: K must be a power of two >= 4");
  end
  if (N_TAPS % H != 0) begin : g_bad_taps
    $error("bubble_filter: N_TAPS must be a multiple of K/2");
  end

endmodule
