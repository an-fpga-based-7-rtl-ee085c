// tb_bubble_filter - window sums of a 32-tap line with k = 8.
// Random patterns; log2(k) = 3 cycles later every overlapping sum must equal
// the number of ones in taps 4i .. 4i+7, and valid_o must follow valid_i.
//
// Expected sums follow the published definition of the overlapping sum; the
// patterns are this testbench's own.
module tb_bubble_filter;
  localparam int unsigned NT = 32, K = 8, NG = NT / (K / 2), SW = 4;

  logic clk = 1'b0, rst = 1'b1, vi = 1'b0, vo;
  logic [NT-1:0] taps = '0;
  logic [SW-1:0] sums [NG-1];
  int checks = 0, failures = 0;

  bubble_filter #(.N_TAPS(NT), .K(K)) dut (.clk, .rst, .valid_i(vi), .taps_i(taps),
                                            .valid_o(vo), .sum_o(sums));
  always #5 clk = ~clk;

  logic [NT-1:0] hist [$];
  logic          vhist [$];

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      taps = $urandom;
      vi   = (n % 7) != 3;
      hist.push_back(taps);
      vhist.push_back(vi);
      @(posedge clk); #1;
      if (hist.size() == 3) begin
        for (int i = 0; i < int'(NG) - 1; i++) begin
          automatic int exp_s = 0;
          for (int t = 4 * i; t < 4 * i + 8; t++) exp_s += int'(hist[0][t]);
          checks++;
          if (int'(sums[i]) != exp_s) begin
            failures++;
            if (failures < 5) $display("n=%0d i=%0d got %0d exp %0d", n, i, sums[i], exp_s);
          end
        end
        checks++;
        if (vo != vhist[0]) failures++;
        void'(hist.pop_front());
        void'(vhist.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
