// tb_voltage_lut - 8-bit-in, 6-bit-out table with latency 3.
// First the power-up straight-line mapping (in >> 2) is checked, then a
// random table is written and every entry read back through the datapath,
// each result exactly LAT cycles after its input.
//
// The two-table structure follows the published design; the sizes and table
// contents are this testbench's own.
module tb_voltage_lut;
  localparam int unsigned IW = 8, OW = 6, LAT = 3;
  logic clk = 1'b0, rst = 1'b1;
  logic we = 1'b0, vi = 1'b0, vo;
  logic [IW-1:0] wa = '0, x = '0;
  logic [OW-1:0] wd = '0, y;
  int checks = 0, failures = 0;
  logic [OW-1:0] model [1 << IW];

  voltage_lut #(.IN_W(IW), .OUT_W(OW), .LATENCY(LAT)) dut (
    .clk, .rst, .wr_en_i(we), .wr_addr_i(wa), .wr_data_i(wd),
    .valid_i(vi), .val_i(x), .valid_o(vo), .val_o(y));

  always #5 clk = ~clk;

  int exp_q [$];
  always @(posedge clk) begin
    if (vo) begin
      checks++;
      if (exp_q.size() == 0) failures++;
      else if (int'(y) != exp_q.pop_front()) failures++;
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep();
    for (int a = 0; a < (1 << IW); a++) begin
      @(negedge clk);
      vi = 1'b1; x = IW'(a);
      exp_q.push_back(int'(model[a]));
    end
    @(negedge clk) vi = 1'b0;
    repeat (LAT + 2) @(posedge clk);
  endtask

  initial begin
    int lat;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int a = 0; a < (1 << IW); a++) model[a] = OW'(a >> (IW - OW));
    sweep();
    for (int a = 0; a < (1 << IW); a++) begin
      @(negedge clk);
      we = 1'b1; wa = IW'(a); wd = OW'($urandom);
      model[a] = wd;
    end
    @(negedge clk) we = 1'b0;
    sweep();
    // latency
    @(negedge clk) vi = 1'b1; x = 8'd5; exp_q.push_back(int'(model[5]));
    @(negedge clk) vi = 1'b0;
    lat = 1;
    while (!vo && lat < 20) begin @(posedge clk); #1; lat++; end
    checks++;
    if (lat != int'(LAT)) begin failures++; $display("latency %0d", lat); end
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
