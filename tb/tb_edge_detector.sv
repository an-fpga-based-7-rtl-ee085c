// tb_edge_detector - first-edge search on a 64-tap line, k = 8, latency 10.
// Three kinds of input:
//  * clean pulses (ones in taps a .. b-1): the 0->1 edge must be reported at
//    a and the 1->0 edge at b, exactly, whenever both lie in the detectable
//    range;
//  * the worked example of the bubble-filter timing diagram (two bubbles,
//    edges at windows 1 and 3, an invalid transition in window 2);
//  * pulses with bubbles flipped next to the edges, checked against a
//    reference implementation of the detection rule written here.
// Every result must appear exactly LAT cycles after its pattern.
//
// The reference edge search follows the published window test; the
// direction-0 position formula checked is this design's own.
module tb_edge_detector;
  localparam int unsigned NT = 64, K = 8, H = 4, NG = NT / H, LAT = 10, PW = 7;

  logic clk = 1'b0, rst = 1'b1, vi = 1'b0;
  logic [NT-1:0] taps = '0;
  logic vo, ff, rf;
  logic [PW-1:0] fp, rp;
  int checks = 0, failures = 0;

  edge_detector #(.N_TAPS(NT), .K(K), .LATENCY(LAT)) dut (
    .clk, .rst, .valid_i(vi), .taps_i(taps), .valid_o(vo),
    .fall_found_o(ff), .fall_pos_o(fp), .rise_found_o(rf), .rise_pos_o(rp));

  always #5 clk = ~clk;

  typedef struct { logic v; logic ff; int fp; logic rf; int rp; } exp_t;
  exp_t q [$];

  // reference model of the detection rule, straight from the taps
  function automatic exp_t model(logic [NT-1:0] t);
    exp_t e;
    int s [NG];
    e.v = 1'b1; e.ff = 1'b0; e.rf = 1'b0; e.fp = 0; e.rp = 0;
    for (int i = 0; i < int'(NG) - 1; i++) begin
      s[i] = 0;
      for (int j = 0; j < int'(K); j++) s[i] += int'(t[i*H + j]);
    end
    for (int i = 1; i <= int'(NG) - 3; i++) begin
      if (s[i] != 0 && s[i] != int'(K)) begin
        if (s[i+1] > int'(H)) begin
          if (s[i-1] < int'(H) && !e.ff) begin e.ff = 1'b1; e.fp = i*H + K - s[i]; end
        end else if (s[i+1] < int'(H)) begin
          if (s[i-1] > int'(H) && !e.rf) begin e.rf = 1'b1; e.rp = i*H + s[i]; end
        end
      end
    end
    return e;
  endfunction

  function automatic logic [NT-1:0] pulse(int a, int b);
    logic [NT-1:0] t = '0;
    for (int i = a; i < b; i++) t[i] = 1'b1;
    return t;
  endfunction

  task automatic apply(logic [NT-1:0] t, exp_t e);
    @(negedge clk);
    taps = t; vi = 1'b1;
    q.push_back(e);
  endtask

  // checker: LAT cycles after each applied pattern
  int n_out = 0;
  always @(posedge clk) begin
    exp_t e;
    if (!rst && q.size() > 0 && vo) begin
      e = q.pop_front();
      n_out++;
      checks++;
      if (ff != e.ff || rf != e.rf || (e.ff && int'(fp) != e.fp) || (e.rf && int'(rp) != e.rp)) begin
        failures++;
        if (failures < 8)
          $display("out %0d: got f%0b@%0d r%0b@%0d exp f%0b@%0d r%0b@%0d", n_out,
                   ff, fp, rf, rp, e.ff, e.fp, e.rf, e.rp);
      end
    end
  end

  int first_apply, first_out;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_t e;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // latency: one pattern, count cycles to valid_o
    e = model(pulse(20, 40));
    apply(pulse(20, 40), e);
    @(negedge clk) vi = 1'b0;
    first_apply = 1;
    for (int c = 2; c <= 40; c++) begin  // edge 1 passed while clearing valid_i
      @(posedge clk); #1;
      if (vo) begin first_out = c; break; end
    end
    checks++;
    if (first_out != int'(LAT)) begin
      failures++;
      $display("latency %0d, expected %0d", first_out, LAT);
    end
    // clean pulses: positions exact
    for (int a = 8; a < 52; a++) begin
      for (int b = a + 10; b < 58; b += 3) begin
        e.v = 1; e.ff = 1; e.fp = a; e.rf = 1; e.rp = b;
        apply(pulse(a, b), e);
      end
    end
    // worked example of the timing diagram:
    // taps 0..23 = 000000 1 0 1 0 111111 00000000 (tap 0 first)
    begin
      automatic logic [NT-1:0] t = '0;
      t[6] = 1; t[8] = 1; t[10] = 1; t[11] = 1;
      for (int i = 12; i < 16; i++) t[i] = 1;
      e.v = 1; e.ff = 1; e.fp = 1*4 + 4; e.rf = 1; e.rp = 3*4 + 4;
      apply(t, e);
      checks++;
      if (model(t).fp != 8 || model(t).rp != 16) failures++;
    end
    // pulses with bubbles near the edges
    for (int n = 0; n < 2000; n++) begin
      automatic int a = 6 + ($urandom % 20);
      automatic int b = a + 8 + ($urandom % 30);
      automatic logic [NT-1:0] t = pulse(a, b);
      if ($urandom % 2) t[a + ($urandom % 3) - 1] ^= 1'b1;
      if ($urandom % 2) t[b + ($urandom % 3) - 1] ^= 1'b1;
      apply(t, model(t));
    end
    @(negedge clk) vi = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
