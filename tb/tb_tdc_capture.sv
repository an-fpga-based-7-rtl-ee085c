// tb_tdc_capture - checks the two capture stages of a 3-block delay line.
// Random CO/O patterns are driven every cycle; two cycles later each output
// tap must equal the reference: O taps inverted, CO taps as is, interleaved
// O_j, CO_j and then permuted per block by a reversed REORDER map.
//
// The O inversion and the reorder between the two stages follow the published
// design; the permutations tried are this testbench's own.
module tb_tdc_capture;
  localparam int unsigned NB = 3;
  localparam int unsigned NE = 8 * NB;
  localparam logic [63:0] RO = 64'h0123_4567_89AB_CDEF; // slot s <- tap 15-s

  logic clk = 1'b0;
  logic [NE-1:0]   co, o;
  logic [16*NB-1:0] taps;
  int checks = 0, failures = 0;

  tdc_capture #(.N_CARRY8(NB), .REORDER(RO)) dut (.clk, .co_i(co), .o_i(o), .taps_o(taps));

  always #5 clk = ~clk;

  function automatic logic [16*NB-1:0] ref_taps(logic [NE-1:0] c, logic [NE-1:0] x);
    logic [16*NB-1:0] nat, r;
    for (int e = 0; e < int'(NE); e++) begin
      nat[2*e]   = ~x[e];
      nat[2*e+1] = c[e];
    end
    for (int b = 0; b < int'(NB); b++)
      for (int s = 0; s < 16; s++) r[16*b + s] = nat[16*b + 15 - s];
    return r;
  endfunction

  logic [16*NB-1:0] hist [$];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    co = '0; o = '0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      co = {$urandom, $urandom};
      o  = {$urandom, $urandom};
      hist.push_back(ref_taps(co, o));
      @(posedge clk); #1;
      // value driven two cycles ago must now be at the output
      if (hist.size() == 2) begin
        checks++;
        if (taps !== hist[0]) begin
          failures++;
          if (failures < 5) $display("mismatch n=%0d got %h exp %h", n, taps, hist[0]);
        end
        void'(hist.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
