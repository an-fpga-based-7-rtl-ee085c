// tb_adc_control - calibration sequence and periodic recalibration.
// Model sub-blocks answer each start pulse with a done after a random delay
// (the bin-by-bin model drops ready on start and raises it later). Checked:
// the automatic run after reset goes length -> alignment -> bin-by-bin ->
// measurement in that order with one start pulse each; run_o is high only
// in measurement; a cal_i request and the RECAL_CYCLES timer each start a
// new run; the run counter counts the completed runs.
//
// The calibration order it expects is this design's own; the published design
// only requires the three calibrations before measuring.
module tb_adc_control;
  import adc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, cal = 1'b0;
  ctl_state_e st;
  logic run, dcs, dcd = 1'b0, als, ald = 1'b0, bs, bready = 1'b0;
  logic [15:0] ncal;
  int checks = 0, failures = 0;
  string order = "";

  adc_control #(.AUTO_START(1'b1), .RECAL_CYCLES(300)) dut (
    .clk, .rst, .cal_i(cal), .state_o(st), .run_o(run),
    .dc_start_o(dcs), .dc_done_i(dcd), .al_start_o(als), .al_done_i(ald),
    .bin_start_o(bs), .bin_ready_i(bready), .n_cal_o(ncal));

  always #5 clk = ~clk;

  // sub-block models
  always @(posedge clk) begin
    if (!rst && dcs) begin
      order = {order, "L"};
      fork begin repeat (5 + $urandom % 20) @(negedge clk); dcd = 1; @(negedge clk); dcd = 0; end join_none
    end
    if (!rst && als) begin
      order = {order, "A"};
      fork begin repeat (5 + $urandom % 20) @(negedge clk); ald = 1; @(negedge clk); ald = 0; end join_none
    end
    if (!rst && bs) begin
      order = {order, "B"};
      fork begin @(negedge clk); bready = 0; repeat (5 + $urandom % 20) @(negedge clk); bready = 1; end join_none
    end
  end

  // run_o must match the measurement state
  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (run != (st == CTL_RUN)) failures++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t_run;
    bready = 1'b1;   // tables from an earlier run
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    while (!run) @(posedge clk);
    checks += 2;
    if (order != "LAB") begin failures++; $display("order %s", order); end
    if (ncal != 1) failures++;
    // host request
    repeat (50) @(posedge clk);
    @(negedge clk) cal = 1'b1;
    @(negedge clk) cal = 1'b0;
    #1;
    checks++;
    if (run) failures++;
    while (!run) @(posedge clk);
    checks += 2;
    if (order != "LABLAB") begin failures++; $display("order %s", order); end
    if (ncal != 2) failures++;
    // periodic recalibration after 300 measurement cycles
    t0 = $time / 10;
    while (run) @(posedge clk);
    t_run = $time / 10 - t0;
    checks++;
    if (t_run < 295 || t_run > 305) begin failures++; $display("run lasted %0d", t_run); end
    while (!run) @(posedge clk);
    checks += 2;
    if (order != "LABLABLAB") begin failures++; $display("order %s", order); end
    if (ncal != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
