// tb_align_cal - pulse alignment on a 64-tap line (middle 32, tolerance 2).
// Model: the pulse centre moves one tap down per added delay tap and the
// datapath answers a delay change 20 cycles later; edges are +/- 6 taps from
// the centre and every fourth sample is invalid. For several start offsets
// the loop must end at the first delay value whose centre lies within the
// tolerance, moving one step at a time, without fail. An offset beyond the
// delay range must end with fail, and so must an input with no valid sample.
//
// The centring goal follows the published design; the delay model and
// tolerances are this testbench's own.
module tb_align_cal;
  localparam int unsigned PW = 7, MID = 32, TOL = 2, DW = 6;
  logic clk = 1'b0, rst = 1'b1;
  logic start = 1'b0, busy, done, fail, vi = 1'b0, load;
  logic [PW-1:0] fpos = '0, rpos = '0;
  logic [DW-1:0] dly;
  int checks = 0, failures = 0;
  int c0 = 40;          // centre at delay 32
  int dly_seen [$];     // delay as seen by the datapath, 20 cycles late
  int loads = 0;
  bit no_valid = 0;

  align_cal #(.POS_W(PW), .MID(MID), .TOL(TOL), .DLY_W(DW), .AVG_LOG2(2),
              .SETTLE(30), .TIMEOUT(200)) dut (
    .clk, .rst, .start_i(start), .busy_o(busy), .done_o(done), .fail_o(fail),
    .valid_i(vi), .fall_pos_i(fpos), .rise_pos_i(rpos), .dly_o(dly), .dly_load_o(load));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    int d, cen;
    if (load) loads++;
    dly_seen.push_back(int'(dly));
    if (dly_seen.size() > 20) void'(dly_seen.pop_front());
    d = dly_seen[0];
    cen = c0 - (d - 32);
    #1;
    vi   = !no_valid && ($urandom % 4 != 0);
    fpos = PW'(cen - 6);
    rpos = PW'(cen + 6);
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int centre0, bit expect_fail);
    int d0 = int'(dly), d, exp_d;
    c0 = centre0;
    // expected end point: walk from d0 toward the window
    d = d0;
    while (d >= 0 && d <= (1 << DW) - 1) begin
      int cen = c0 - (d - 32);
      if (cen > int'(MID + TOL)) d++;
      else if (cen + int'(TOL) < int'(MID)) d--;
      else break;
    end
    exp_d = d;
    loads = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) @(posedge clk);
    #2;
    checks += 2;
    if (fail != expect_fail) begin failures++; $display("fail=%0b exp %0b", fail, expect_fail); end
    if (!expect_fail) begin
      if (int'(dly) != exp_d) begin failures++; $display("dly %0d exp %0d", dly, exp_d); end
      checks++;
      if (loads != (exp_d > d0 ? exp_d - d0 : d0 - exp_d)) begin
        failures++; $display("loads %0d", loads);
      end
    end
    repeat (25) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    #1;
    checks++;
    if (int'(dly) != 32) failures++;       // reset value: middle of the range
    run(40, 0);   // centre too high -> more delay
    run(20, 0);   // centre too low  -> less delay
    run(33, 0);   // already inside
    run(200, 1);  // out of range -> fail
    no_valid = 1;
    run(33, 1);   // no valid sample -> fail by timeout
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
