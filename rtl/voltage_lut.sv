// voltage_lut - voltage characteristic correction of one edge direction.
//
// After bin-by-bin correction a sample is a linear measure of time, but the
// reference slope is not a straight line and the comparator has dead bands,
// so time still maps non-linearly to input voltage. A table, measured by
// applying a known slow ramp to the input and matching the digitised samples
// against the ramp voltage, maps each corrected time code to a voltage code.
// One table is kept per edge direction since the rising and falling slopes
// differ.
//
// The table is filled through a write port (wr_en_i / wr_addr_i / wr_data_i)
// by whatever computes the ramp match; until then it holds the straight-line
// mapping val >> (IN_W - OUT_W). Interface: corrected time in, voltage code
// out. Timing: LATENCY cycles (a registered table read plus balancing
// registers), one sample per clock; a table write takes effect for samples
// read in the following cycle.
//
// Origin: one time-to-voltage table per edge follows the published design;
// loading it through a write port, the widths and the linear initial contents
// are this design's choices.
module voltage_lut #(
  parameter int unsigned IN_W    = adc_pkg::TIME_W,
  parameter int unsigned OUT_W   = adc_pkg::VOUT_W,
  parameter int unsigned LATENCY = adc_pkg::VLUT_LAT
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              wr_en_i,
  input  logic [IN_W-1:0]   wr_addr_i,
  input  logic [OUT_W-1:0]  wr_data_i,
  input  logic              valid_i,
  input  logic [IN_W-1:0]   val_i,
  output logic              valid_o,
  output logic [OUT_W-1:0]  val_o
);

  localparam int unsigned DEPTH = 1 << IN_W;

  logic [OUT_W-1:0] table_q [DEPTH];

  initial begin
    for (int a = 0; a < int'(DEPTH); a++) table_q[a] = OUT_W'(a >> (IN_W - OUT_W));
  end

  always_ff @(posedge clk) begin
    if (wr_en_i) table_q[wr_addr_i] <= wr_data_i;
  end

  logic [OUT_W-1:0] pd [LATENCY];
  logic             pv [LATENCY];

  always_ff @(posedge clk) begin
    pd[0] <= table_q[val_i];
    for (int p = 1; p < int'(LATENCY); p++) pd[p] <= pd[p-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < int'(LATENCY); p++) pv[p] <= 1'b0;
    end else begin
      pv[0] <= valid_i;
      for (int p = 1; p < int'(LATENCY); p++) pv[p] <= pv[p-1];
    end
  end

  assign val_o   = pd[LATENCY-1];
  assign valid_o = pv[LATENCY-1];

  if (IN_W < OUT_W) begin : g_bad_w
    $error("voltage_lut: IN_W must be at least OUT_W");
  end
  if (LATENCY < 1) begin : g_bad_lat
    $error("voltage_lut: LATENCY must be at least 1");
  end

endmodule
