// tdc_capture - the two flip-flop stages behind one carry-chain delay line.
//
// The delay line is a chain of CARRY8 blocks whose select inputs are all high,
// so every MUXCY passes the carry and the comparator edge ripples through it.
// Each carry element has two outputs: CO (carry out) and O (XOR of select and
// carry in). Sampling both doubles the number of taps ("dual sampling").
// Because the select is high, O is the inverted carry-in; it is inverted back
// after the first flip-flop stage.
//
// Stage 1 registers the raw CO/O outputs right next to the carry elements.
// Stage 2 re-registers them against metastability; the routing between the two
// stages applies a fixed reordering of the 16 taps of each CARRY8 block, chosen
// from static timing analysis so that taps come out in order of delay. That
// order depends on the device and placement: it is the parameter REORDER, a
// list of sixteen 4-bit fields where output slot s of a block takes natural tap
// REORDER[4*s +: 4]. Natural tap 2*j is O_j (inverted), natural tap 2*j+1 is
// CO_j; the default is this natural order.
//
// Interface: co_i / o_i are the carry element outputs of one chain (element 0
// nearest the chain input); taps_o is the ordered thermometer-like pattern.
// Timing: two cycles from co_i/o_i to taps_o, one sample per clock.
module tdc_capture #(
  parameter int unsigned N_CARRY8 = adc_pkg::N_CARRY8,
  parameter logic [63:0] REORDER  = 64'hFEDC_BA98_7654_3210
) (
  input  logic                      clk,
  input  logic [8*N_CARRY8-1:0]     co_i,
  input  logic [8*N_CARRY8-1:0]     o_i,
  output logic [16*N_CARRY8-1:0]    taps_o
);

  localparam int unsigned N_ELEM = 8 * N_CARRY8;

  logic [N_ELEM-1:0]     ff1_co, ff1_o;
  logic [16*N_CARRY8-1:0] natural_taps;

  // Stage 1: capture next to the carry elements.
  always_ff @(posedge clk) begin
    ff1_co <= co_i;
    ff1_o  <= o_i;
  end

  // Interleave O (inverted back) and CO in natural delay order.
  always_comb begin
    for (int e = 0; e < int'(N_ELEM); e++) begin
      natural_taps[2*e]   = ~ff1_o[e];
      natural_taps[2*e+1] = ff1_co[e];
    end
  end

  // Stage 2: metastability register with per-CARRY8 reordering.
  always_ff @(posedge clk) begin
    for (int b = 0; b < int'(N_CARRY8); b++) begin
      for (int s = 0; s < 16; s++) begin
        taps_o[16*b + s] <= natural_taps[16*b + int'(REORDER[4*s +: 4])];
      end
    end
  end

endmodule
