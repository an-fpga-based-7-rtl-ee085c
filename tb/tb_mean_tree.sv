// tb_mean_tree - mean of four 10-bit values and of two values.
// Random inputs and valid flags; one cycle later the output must be the sum
// shifted right by log2(N) and valid only if all inputs were valid.
//
// Expected values are the truncated mean chosen by this design.
module tb_mean_tree;
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] v4;
  logic [1:0] v2;
  logic [9:0] x4 [4];
  logic [9:0] x2 [2];
  logic       o4v, o2v;
  logic [9:0] o4, o2;
  int checks = 0, failures = 0;

  mean_tree #(.N(4), .W(10)) dut4 (.clk, .rst, .valid_i(v4), .val_i(x4), .valid_o(o4v), .val_o(o4));
  mean_tree #(.N(2), .W(10)) dut2 (.clk, .rst, .valid_i(v2), .val_i(x2), .valid_o(o2v), .val_o(o2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e4, e2;
    logic ev4, ev2;
    v4 = '0; v2 = '0;
    foreach (x4[i]) x4[i] = '0;
    foreach (x2[i]) x2[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      e4 = 0; e2 = 0;
      foreach (x4[i]) begin x4[i] = 10'($urandom); e4 += int'(x4[i]); end
      foreach (x2[i]) begin x2[i] = 10'($urandom); e2 += int'(x2[i]); end
      v4 = ($urandom % 4 == 0) ? 4'($urandom) : 4'hF;
      v2 = ($urandom % 4 == 0) ? 2'($urandom) : 2'h3;
      ev4 = &v4; ev2 = &v2;
      @(posedge clk); #1;
      checks += 4;
      if (int'(o4) != e4 / 4) failures++;
      if (int'(o2) != e2 / 2) failures++;
      if (o4v != ev4) failures++;
      if (o2v != ev2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
