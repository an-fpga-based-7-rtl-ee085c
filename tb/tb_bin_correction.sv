// tb_bin_correction - code density calibration of 32 bins, 2^10 hits.
// Positions are drawn with unequal bin probabilities (as a carry chain with
// unequal element delays produces them), interleaved with invalid cycles.
// The testbench keeps its own histogram and computes each bin's corrected
// value as the centre of the bin on the cumulative hit scale, in 8 bits:
// floor((hits below + hits in bin / 2) * 256 / 1024). After calibration
// every bin is looked up and compared; the result must arrive LAT cycles
// after the position, and nothing may be valid before the table is ready.
//
// The expected table is computed from the bin-centre formula of the published
// method; bin widths and sizes are this testbench's own.
module tb_bin_correction;
  localparam int unsigned NB = 32, IW = 6, OW = 8, HL = 10, LAT = 6;
  logic clk = 1'b0, rst = 1'b1;
  logic start = 1'b0, busy, ready, vi = 1'b0, vo;
  logic [IW-1:0] pos = '0;
  logic [OW-1:0] y;
  int checks = 0, failures = 0;
  int hist [NB];
  int weight [NB];
  int exp_q [$];
  int early_valid = 0;

  bin_correction #(.NBINS(NB), .IN_W(IW), .OUT_W(OW), .HIST_LOG2(HL), .LATENCY(LAT)) dut (
    .clk, .rst, .cal_start_i(start), .cal_busy_o(busy), .lut_ready_o(ready),
    .valid_i(vi), .pos_i(pos), .valid_o(vo), .val_o(y));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (vo && !rst) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; early_valid++; if (early_valid < 3) $display("early valid at %0t ready=%0b state=%0d", $time, ready, dut.state); end
      else begin
        automatic int e = exp_q.pop_front();
        if (int'(y) != e) begin
          failures++;
          if (failures < 6) $display("got %0d exp %0d", y, e);
        end
      end
    end
  end

  function automatic int draw();
    int tot = 0, r;
    foreach (weight[i]) tot += weight[i];
    r = int'($urandom % tot);
    foreach (weight[i]) begin
      if (r < weight[i]) return i;
      r -= weight[i];
    end
    return NB - 1;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int below, n, lat;
    foreach (weight[i]) weight[i] = (i == 7) ? 0 : 1 + int'($urandom % 9);
    foreach (hist[i]) hist[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // samples before calibration are not counted and not output
    repeat (20) begin @(negedge clk); vi = 1'b1; pos = IW'(draw()); end
    @(negedge clk) begin vi = 1'b0; start = 1'b1; end
    @(negedge clk) start = 1'b0;
    checks++;
    if (!busy || ready) failures++;
    // the clear phase takes NB cycles; then exactly 2^HL valid hits follow
    @(negedge clk) vi = 1'b0;
    repeat (NB + 2) @(negedge clk);
    n = 0;
    while (n < (1 << HL)) begin
      @(negedge clk);
      vi = ($urandom % 5) != 0;
      pos = IW'(draw());
      if (vi) begin hist[pos]++; n++; end
    end
    @(negedge clk) vi = 1'b0;
    while (!ready) @(posedge clk);
    checks++;
    if (busy) failures++;
    // look up every bin
    below = 0;
    for (int b = 0; b < int'(NB); b++) begin
      automatic int e = ((2 * below + hist[b]) * (1 << OW)) / (2 * (1 << HL));
      if (e > (1 << OW) - 1) e = (1 << OW) - 1;
      @(negedge clk);
      vi = 1'b1; pos = IW'(b);
      exp_q.push_back(e);
      below += hist[b];
    end
    @(negedge clk) vi = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    // latency
    @(negedge clk) begin vi = 1'b1; pos = 6'd3; end
    exp_q.push_back(((2 * (hist[0] + hist[1] + hist[2]) + hist[3]) * (1 << OW)) / (2 * (1 << HL)));
    @(negedge clk) vi = 1'b0;
    lat = 1;
    while (!vo && lat < 20) begin @(posedge clk); #1; lat++; end
    checks++;
    if (lat != int'(LAT)) begin failures++; $display("latency %0d", lat); end
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || early_valid != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
