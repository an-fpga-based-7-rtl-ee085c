// sample_fifo - capture buffer for ADC samples.
//
// Samples are written at the sample clock and read out by a processor at its
// own pace (in the reference setup an UltraRAM FIFO read over AXI). This is a
// synchronous first-in first-out buffer of DEPTH words held in one memory
// array with a write and a read pointer. A write to a full buffer is dropped
// and sets the sticky overflow_o flag (cleared by clr_i); a read of an empty
// buffer is ignored.
// Timing: rd_data_o shows the oldest word whenever empty_o is low (first-word
// fall-through); rd_en_i pops it at the clock edge. A write is visible one
// cycle later.
//
// Origin: the published design stores samples in an on-chip FIFO read by a
// processor; depth, word format and the overflow behaviour are this design's.
module sample_fifo #(
  parameter int unsigned W     = 2 * adc_pkg::VOUT_W,
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     clr_i,
  input  logic                     wr_en_i,
  input  logic [W-1:0]             wr_data_i,
  input  logic                     rd_en_i,
  output logic [W-1:0]             rd_data_o,
  output logic                     empty_o,
  output logic                     full_o,
  output logic                     overflow_o,
  output logic [$clog2(DEPTH):0]   count_o
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW:0]   wp, rp;
  logic          do_wr, do_rd;

  assign empty_o = (wp == rp);
  assign full_o  = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign count_o = wp - rp;
  assign do_wr   = wr_en_i && !full_o;
  assign do_rd   = rd_en_i && !empty_o;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= wr_data_i;
  end

  assign rd_data_o = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst || clr_i) begin
      wp         <= '0;
      rp         <= '0;
      overflow_o <= 1'b0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      if (wr_en_i && full_o) overflow_o <= 1'b1;
    end
  end

  if ((DEPTH & (DEPTH - 1)) != 0 || DEPTH < 2) begin : g_bad_depth
    $error("sample_fifo: DEPTH must be a power of two");
  end

endmodule
