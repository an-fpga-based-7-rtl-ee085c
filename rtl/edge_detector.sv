// edge_detector - first edge of each direction in one captured delay line.
//
// The captured pattern of a delay line holds the comparator pulse as a run of
// ones (0..0 1..1 0..0 along the chain). This block finds where
// the pulse starts and ends, immune to bubbles.
//
//  1. bubble_filter gives the overlapping k-tap window sums S(i), window i
//     starting at tap i*k/2.
//  2. Detection (one stage, every window i = 1 .. N_GRP-3, both neighbours
//     needed): a window is a transition if 0 < S(i) < k. If the next window
//     holds more than k/2 ones the pattern goes 0 -> 1 along the chain
//     (direction 0, named "falling" in the edge detection algorithm) and the
//     transition is valid when the previous window holds less than k/2 ones.
//     If the next window holds less than k/2 ones the pattern goes 1 -> 0
//     (direction 1, "rising") and it is valid when the previous window holds
//     more than k/2. A window with exactly k/2 ones next is no transition.
//  3. Position: pos = i*k/2 + S(i) for direction 1 (ones sit below the edge)
//     and pos = i*k/2 + (k - S(i)) for direction 0 (zeros sit below it); both
//     name the index of the first tap at the new level.
//  4. A pipelined priority tree (one level per stage) keeps, per direction,
//     the valid transition with the lowest window index: the first edge.
//  5. Balancing registers pad the block to LATENCY cycles (13 by default).
//
// Interface: taps_i with valid_i in; per direction a found flag and a
// position out. Timing: LATENCY cycles, one pattern per clock.
//
// Origin: the window test, the position of direction 1 and the choice of the
// first edge follow the published design, as does the 13-cycle latency; the
// position formula for direction 0, the window range and the priority tree
// are this design's own.
module edge_detector #(
  parameter int unsigned N_TAPS  = adc_pkg::N_TAPS,
  parameter int unsigned K       = adc_pkg::BF_K,
  parameter int unsigned LATENCY = adc_pkg::ED_LAT,
  // derived
  parameter int unsigned POS_W   = $clog2(N_TAPS + 1)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               valid_i,
  input  logic [N_TAPS-1:0]  taps_i,
  output logic               valid_o,
  output logic               fall_found_o,  // direction 0 (0 -> 1 along chain)
  output logic [POS_W-1:0]   fall_pos_o,
  output logic               rise_found_o,  // direction 1 (1 -> 0 along chain)
  output logic [POS_W-1:0]   rise_pos_o
);

  localparam int unsigned H      = K / 2;
  localparam int unsigned N_GRP  = N_TAPS / H;
  localparam int unsigned SW     = $clog2(K + 1);
  localparam int unsigned BF_LAT = $clog2(K);
  localparam int unsigned N_CAND = N_GRP - 3;          // windows 1 .. N_GRP-3
  localparam int unsigned DEPTH  = $clog2(N_CAND);
  localparam int unsigned N_LEAF = 1 << DEPTH;
  localparam int unsigned NAT    = BF_LAT + 1 + DEPTH; // natural latency
  localparam int unsigned PAD    = LATENCY - NAT;

  typedef struct packed {
    logic             found;
    logic [POS_W-1:0] pos;
  } edge_t;

  // ---------------- bubble filter ----------------
  logic          bf_valid;
  logic [SW-1:0] s [N_GRP-1];

  bubble_filter #(.N_TAPS(N_TAPS), .K(K)) u_bf (
    .clk, .rst, .valid_i, .taps_i, .valid_o(bf_valid), .sum_o(s)
  );

  // ---------------- detection (Algorithm: edge detection) ----------------
  // tree[0] holds the registered detection result of every candidate window.
  edge_t tree_f [DEPTH+1][N_LEAF];
  edge_t tree_r [DEPTH+1][N_LEAF];
  logic  vld [DEPTH+1];

  always_ff @(posedge clk) begin
    for (int c = 0; c < int'(N_LEAF); c++) begin
      tree_f[0][c] <= '0;
      tree_r[0][c] <= '0;
      if (c < int'(N_CAND)) begin
        automatic int i = c + 1;
        if (s[i] != '0 && s[i] != SW'(K)) begin
          if (s[i+1] > SW'(H)) begin
            tree_f[0][c].found <= (s[i-1] < SW'(H));
            tree_f[0][c].pos   <= POS_W'(i * H) + POS_W'(SW'(K) - s[i]);
          end else if (s[i+1] < SW'(H)) begin
            tree_r[0][c].found <= (s[i-1] > SW'(H));
            tree_r[0][c].pos   <= POS_W'(i * H) + POS_W'(s[i]);
          end
        end
      end
    end
  end

  // ---------------- first-edge priority tree ----------------
  always_ff @(posedge clk) begin
    for (int d = 0; d < int'(DEPTH); d++) begin
      for (int n = 0; n < int'(N_LEAF >> (d + 1)); n++) begin
        tree_f[d+1][n] <= tree_f[d][2*n].found ? tree_f[d][2*n] : tree_f[d][2*n+1];
        tree_r[d+1][n] <= tree_r[d][2*n].found ? tree_r[d][2*n] : tree_r[d][2*n+1];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int d = 0; d <= int'(DEPTH); d++) vld[d] <= 1'b0;
    end else begin
      vld[0] <= bf_valid;
      for (int d = 0; d < int'(DEPTH); d++) vld[d+1] <= vld[d];
    end
  end

  // ---------------- balancing registers ----------------
  edge_t res_f, res_r;
  logic  res_v;

  if (PAD == 0) begin : g_nopad
    assign res_f = tree_f[DEPTH][0];
    assign res_r = tree_r[DEPTH][0];
    assign res_v = vld[DEPTH];
  end else begin : g_pad
    edge_t pf [PAD];
    edge_t pr [PAD];
    logic  pv [PAD];
    always_ff @(posedge clk) begin
      pf[0] <= tree_f[DEPTH][0];
      pr[0] <= tree_r[DEPTH][0];
      for (int p = 1; p < int'(PAD); p++) begin
        pf[p] <= pf[p-1];
        pr[p] <= pr[p-1];
      end
    end
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int p = 0; p < int'(PAD); p++) pv[p] <= 1'b0;
      end else begin
        pv[0] <= vld[DEPTH];
        for (int p = 1; p < int'(PAD); p++) pv[p] <= pv[p-1];
      end
    end
    assign res_f = pf[PAD-1];
    assign res_r = pr[PAD-1];
    assign res_v = pv[PAD-1];
  end

  assign valid_o      = res_v;
  assign fall_found_o = res_f.found;
  assign fall_pos_o   = res_f.pos;
  assign rise_found_o = res_r.found;
  assign rise_pos_o   = res_r.pos;

  if (LATENCY < NAT) begin : g_bad_lat
    $error("edge_detector: LATENCY below the natural pipeline depth");
  end
  if (N_CAND < 2) begin : g_bad_taps
    $error("edge_detector: delay line too short for the bubble filter window");
  end

endmodule
