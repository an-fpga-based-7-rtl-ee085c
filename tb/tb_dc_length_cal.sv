// tb_dc_length_cal - length calibration of a 64-tap line, 16 phase steps.
// A model clock manager answers each phase-step request after a random
// delay; a model delay line shows a clock of period P taps (50 % duty)
// shifted by the current phase. The line is longer than P, so at some phases
// two high phases are visible. Expected result: 2 * the fewest ones seen.
// Also checked: the chain input is switched to the clock only while the
// calibration runs, exactly N_PHASES steps are requested (a full turn), and
// the result is reproduced for a second period.
//
// The expected length is the doubled-minimum rule of the published method
// applied to the model; the clock-manager model is this testbench's own.
module tb_dc_length_cal;
  localparam int unsigned NT = 64, NPH = 16;
  logic clk = 1'b0, rst = 1'b1;
  logic start = 1'b0, busy, done, sel, ps_en, ps_done = 1'b0;
  logic [NT-1:0] taps;
  logic [7:0] len;
  int checks = 0, failures = 0;
  int phase = 0, steps = 0, period = 40;

  dc_length_cal #(.N_TAPS(NT), .N_PHASES(NPH), .AVG_LOG2(2), .SETTLE(4)) dut (
    .clk, .rst, .start_i(start), .busy_o(busy), .done_o(done), .sel_clk_o(sel),
    .ps_en_o(ps_en), .ps_done_i(ps_done), .taps_i(taps), .len_o(len));

  always #5 clk = ~clk;

  function automatic logic [NT-1:0] pattern(int ph, int p);
    logic [NT-1:0] t;
    int off = (ph * p) / int'(NPH);
    for (int i = 0; i < int'(NT); i++) t[i] = ((i + off) % p) < p / 2;
    return t;
  endfunction

  // delay line: clock pattern while selected, a comparator-like pulse otherwise
  always_comb taps = sel ? pattern(phase, period) : 64'h0000_0FFF_F000_0000;

  // clock manager phase shift model
  initial begin
    forever begin
      @(posedge clk);
      if (ps_en && !rst) begin
        repeat (2 + ($urandom % 6)) @(posedge clk);
        phase = (phase + 1) % int'(NPH);
        steps++;
        @(negedge clk) ps_done = 1'b1;
        @(negedge clk) ps_done = 1'b0;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_cal(int p);
    int mn = 1 << 30;
    period = p;
    for (int ph = 0; ph < int'(NPH); ph++)
      if ($countones(pattern(ph, p)) < mn) mn = $countones(pattern(ph, p));
    steps = 0;
    checks++;
    if (sel) failures++;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) begin
      @(posedge clk); #1;
      if (busy && !sel) begin failures++; checks++; end
    end
    checks += 3;
    if (int'(len) != 2 * mn) begin failures++; $display("len %0d exp %0d", len, 2 * mn); end
    if (steps != int'(NPH)) begin failures++; $display("steps %0d", steps); end
    if (phase != 0) begin failures++; $display("phase %0d", phase); end
    @(posedge clk); #1;
    checks++;
    if (sel || busy) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run_cal(40);
    run_cal(48);
    run_cal(36);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
